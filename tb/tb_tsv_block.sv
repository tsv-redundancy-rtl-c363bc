// tb_tsv_block: tests tsv_block for all three chaining policies, on the 4 x 5
// grid of the chaining example, on narrow and tall grids, on the default
// 5 x 10 block, and on a 2 x 3 block whose shift statistics reproduce the
// six-TSV example: with one defect among the five regular TSVs, chain position
// k (0 = head) moves in k+1 of the 5 cases.
module tb_tsv_block;
  import tsv_pkg::*;
  localparam int N = 7;
  int  ck[N], fl[N];
  bit  dn[N];
  int checks, failures;

  tsv_block_checker #(.ROWS(4), .COLS(5),  .STYLE(SPIRAL))            u0 (ck[0], fl[0], dn[0]);
  tsv_block_checker #(.ROWS(4), .COLS(5),  .STYLE(SNAKE))             u1 (ck[1], fl[1], dn[1]);
  tsv_block_checker #(.ROWS(4), .COLS(5),  .STYLE(HYBRID))            u2 (ck[2], fl[2], dn[2]);
  tsv_block_checker #(.ROWS(3), .COLS(7),  .STYLE(HYBRID))            u3 (ck[3], fl[3], dn[3]);
  tsv_block_checker #(.ROWS(7), .COLS(3),  .STYLE(HYBRID))            u4 (ck[4], fl[4], dn[4]);
  tsv_block_checker #(.ROWS(5), .COLS(10), .STYLE(SPIRAL))            u5 (ck[5], fl[5], dn[5]);
  tsv_block_checker #(.ROWS(2), .COLS(3),  .STYLE(SNAKE), .SHOW(1'b1)) u6 (ck[6], fl[6], dn[6]);

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
  endfunction

  initial begin
    #1000000;
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (dn.and());
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
