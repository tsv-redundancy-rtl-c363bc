// tb_scan_chain: loads random patterns into the scan chain and checks that the
// parallel outputs hold the pattern after exactly LEN shift cycles (not one
// cycle earlier), that the bits leave on scan_out in order, that a low
// shift_en holds the contents and that reset clears them.
module tb_scan_chain;
  localparam int unsigned LEN = 490;

  logic clk = 0, rst_n, shift_en, scan_in, scan_out;
  logic [LEN-1:0] q;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [LEN-1:0] pat, pat2;
    int cycles;
    rst_n = 0; shift_en = 0; scan_in = 0;
    repeat (2) @(posedge clk);
    #1 chk(q == '0, "reset clears chain");
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < LEN; i += 32) pat[i +: 32] = $urandom;
      pat2 = pat;
      cycles = 0;
      for (int i = LEN - 1; i >= 0; i--) begin
        @(negedge clk); shift_en = 1; scan_in = pat[i];
        @(posedge clk); cycles++;
        #1;
        if (i == 1) chk(q != pat || pat == {pat[LEN-2:0], pat[LEN-1]}, "not loaded one cycle early");
      end
      @(negedge clk); shift_en = 0;
      chk(q == pat, $sformatf("pattern %0d loaded", t));
      chk(cycles == LEN, "load takes LEN cycles");
      chk(scan_out == pat[LEN-1], "scan_out shows last bit");
      repeat (5) @(posedge clk);
      #1 chk(q == pat, "hold while shift_en low");
      // shift the pattern out and compare bit order
      for (int i = LEN - 1; i >= LEN - 16; i--) begin
        @(negedge clk);
        chk(scan_out == pat2[i], $sformatf("scan_out bit %0d", i));
        shift_en = 1; scan_in = 0;
        @(posedge clk);
      end
      @(negedge clk); shift_en = 0;
    end
    rst_n = 0; #1;
    chk(q == '0, "async reset clears chain");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
