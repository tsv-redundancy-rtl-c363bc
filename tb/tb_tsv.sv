// tb_tsv: checks the TSV model: a good via passes both levels, an open one
// delivers its open level whatever is driven.
module tb_tsv;
  logic d, fail, q;
  logic d1, fail1, q1;
  int checks = 0, failures = 0;

  tsv dut (.d(d), .fail(fail), .q(q));
  tsv #(.OPEN_VALUE(1'b1)) dut1 (.d(d1), .fail(fail1), .q(q1));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {fail, d} = k[1:0];
      {fail1, d1} = k[1:0];
      #1;
      checks += 2;
      if (q !== (fail ? 1'b0 : d))  begin failures++; $display("FAIL d=%b fail=%b q=%b", d, fail, q); end
      if (q1 !== (fail1 ? 1'b1 : d1)) begin failures++; $display("FAIL open-high d=%b q=%b", d1, q1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
