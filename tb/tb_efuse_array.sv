// tb_efuse_array: checks that an unprogrammed array reads 0, that a strobe
// blows exactly the fuses selected, that the new state shows one clock edge
// after the strobe, that data without a strobe changes nothing, and that a
// blown fuse can never be cleared.
module tb_efuse_array;
  localparam int unsigned NBITS = 490;

  logic clk = 0, prog;
  logic [NBITS-1:0] prog_data, fuse, model;
  int checks = 0, failures = 0;

  efuse_array #(.NBITS(NBITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [NBITS-1:0] rnd();
    logic [NBITS-1:0] v;
    for (int i = 0; i < NBITS; i += 32) v[i +: 32] = $urandom & $urandom;
    return v;
  endfunction

  initial begin
    prog = 0; prog_data = '0; model = '0;
    @(negedge clk);
    chk(fuse == '0, "unprogrammed array reads zero");
    prog_data = '1;
    repeat (3) @(negedge clk);
    chk(fuse == '0, "data without strobe blows nothing");
    for (int t = 0; t < 20; t++) begin
      prog_data = rnd();
      prog = 1;
      #1 chk(fuse == model, "no change before the clock edge");
      @(negedge clk);
      prog = 0;
      model |= prog_data;
      chk(fuse == model, $sformatf("strobe %0d blows selected fuses", t));
      prog_data = '0;
      @(negedge clk);
      chk(fuse == model, "blown fuses stay blown");
    end
    prog_data = '0; prog = 1;
    @(negedge clk); prog = 0;
    chk(fuse == model, "zero data clears nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
