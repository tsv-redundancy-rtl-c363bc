// tb_tsv_redundancy_styles: the interface with one block per chaining policy,
// each a 4 x 5 grid as in the chaining example: a spiral block inside the tier,
// a snake block on a tier edge and a hybrid block at a tier corner.
//
// Fuses can be blown only once, so each of the 12 rounds uses its own
// interface instance, like a fresh stack. In each round a random TSV of every
// block is made to fail, the tester finds the failed chain positions with all
// ones driven, loads both repair patterns through the scan chains, burns the fuses and
// checks that every signal arrives. The chain order is not given to the
// testbench; it only sees outputs.
module tb_tsv_redundancy_styles;
  import tsv_pkg::*;
  localparam int NB = 3, ROWS = 4, COLS = 5, R = 12;
  localparam int NT = ROWS * COLS, NS = NT - 1;
  localparam int TXB = NB * (NS - 1), RXB = NB * NS;
  localparam chain_style_e STY [NB] = '{SPIRAL, SNAKE, HYBRID};

  logic clk = 0, rst_n;
  logic [NB-1:0][NS-1:0] sig_in;
  logic [NB-1:0][NS-1:0] sig_out [R];
  logic [NB-1:0][NT-1:0] tsv_fail [R];
  logic tx_scan_en [R], tx_scan_in [R], tx_scan_out [R], tx_fuse_prog [R];
  logic rx_scan_en [R], rx_scan_in [R], rx_scan_out [R], rx_fuse_prog [R];

  for (genvar i = 0; i < R; i++) begin : g_stack
    tsv_redundancy_top #(.NUM_BLOCKS(NB), .ROWS(ROWS), .COLS(COLS), .STYLE(STY)) dut (
      .clk(clk), .rst_n(rst_n), .sig_in(sig_in), .sig_out(sig_out[i]),
      .tsv_fail(tsv_fail[i]),
      .tx_scan_en(tx_scan_en[i]), .tx_scan_in(tx_scan_in[i]),
      .tx_scan_out(tx_scan_out[i]), .tx_fuse_prog(tx_fuse_prog[i]),
      .rx_scan_en(rx_scan_en[i]), .rx_scan_in(rx_scan_in[i]),
      .rx_scan_out(rx_scan_out[i]), .rx_fuse_prog(rx_fuse_prog[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_repaired = 0, n_spare_hit = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [NB];
    logic [TXB-1:0] tx_pat;
    logic [RXB-1:0] rx_pat;
    rst_n = 0; sig_in = '0;
    for (int i = 0; i < R; i++) begin
      tsv_fail[i] = '0;
      tx_scan_en[i] = 0; tx_scan_in[i] = 0; tx_fuse_prog[i] = 0;
      rx_scan_en[i] = 0; rx_scan_in[i] = 0; rx_fuse_prog[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < R; i++) begin
      for (int b = 0; b < NB; b++) tsv_fail[i][b][$urandom_range(NT - 1)] = 1'b1;
      sig_in = '1;
      #1;
      tx_pat = '0; rx_pat = '0;
      for (int b = 0; b < NB; b++) begin
        p[b] = NS;
        for (int k = NS - 1; k >= 0; k--) if (!sig_out[i][b][k]) p[b] = k;
        if (p[b] == NS) n_spare_hit++;
        for (int j = 1; j < NS; j++) tx_pat[b*(NS-1) + j - 1] = (j > p[b]);
        for (int j = 0; j < NS; j++) rx_pat[b*NS + j]         = (j >= p[b]);
      end
      for (int t = RXB - 1; t >= 0; t--) begin
        @(negedge clk);
        rx_scan_en[i] = 1; rx_scan_in[i] = rx_pat[t];
        tx_scan_en[i] = (t < TXB); tx_scan_in[i] = (t < TXB) ? tx_pat[t] : 1'b0;
      end
      @(negedge clk);
      rx_scan_en[i] = 0; tx_scan_en[i] = 0;
      tx_fuse_prog[i] = 1; rx_fuse_prog[i] = 1;
      @(negedge clk);
      tx_fuse_prog[i] = 0; rx_fuse_prog[i] = 0;
      repeat (10) begin
        for (int b = 0; b < NB; b++) sig_in[b] = NS'($urandom);
        #1;
        for (int b = 0; b < NB; b++)
          chk(sig_out[i][b] == sig_in[b],
              $sformatf("round %0d, %s block repaired", i, STY[b].name()));
      end
      for (int b = 0; b < NB; b++) if (p[b] < NS) n_repaired++;
    end
    $display("repairs %0d, defects on a spare TSV %0d", n_repaired, n_spare_hit);
    chk(n_repaired > 0, "some repairs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
