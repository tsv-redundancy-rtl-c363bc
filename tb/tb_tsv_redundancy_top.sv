// tb_tsv_redundancy_top: end-to-end test of the redundant TSV interface at its
// default size (10 blocks of 5 x 10 TSVs, 490 signals).
//
// The testbench plays the tester of a freshly bonded stack:
//   1. With no defect, every signal arrives unshifted (fuses unprogrammed).
//   2. Defects are injected: none, the head TSV, the last regular TSV, the
//      redundant TSV, a middle TSV, two TSVs in one block, and random TSVs.
//   3. Connectivity test: with all ones driven, each output that reads 0
//      names a failed chain position. A failed redundant TSV is invisible.
//   4. The repair pattern of each tier is computed from the failures found,
//      shifted in through the scan chains (checked to take exactly the chain
//      length in cycles) and burnt into the e-fuses with a one-cycle strobe.
//   5. All blocks with at most one defect must now deliver every signal;
//      the block with two defects must lose exactly one signal. The repair
//      must hold across a reset.
// Every mechanism is counted and a mechanism that never happened is a failure.
module tb_tsv_redundancy_top;
  import tsv_pkg::*;
  localparam int NB = 10, ROWS = 5, COLS = 10;
  localparam int NT = ROWS * COLS, NS = NT - 1;
  localparam int TXB = NB * (NS - 1), RXB = NB * NS;

  logic clk = 0, rst_n;
  logic [NB-1:0][NS-1:0] sig_in, sig_out;
  logic [NB-1:0][NT-1:0] tsv_fail;
  logic tx_scan_en, tx_scan_in, tx_scan_out, tx_fuse_prog;
  logic rx_scan_en, rx_scan_in, rx_scan_out, rx_fuse_prog;

  tsv_redundancy_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pass_unrepaired = 0, n_defect_found = 0, n_shift_repair = 0,
      n_redundant_defect = 0, n_unrepairable = 0, n_scan_load = 0,
      n_fuse_program = 0, n_kept_after_reset = 0, n_head_repair = 0,
      n_tail_repair = 0;

  int found[NB][$];          // failed chain positions seen by the tester
  int repaired_pos[NB];      // position repaired per block, NS = none
  logic [TXB-1:0] tx_pat;
  logic [RXB-1:0] rx_pat;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int cell_at(chain_style_e s, int p);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (chain_pos(s, ROWS, COLS, r, c) == p) return r * COLS + c;
    return -1;
  endfunction

  function automatic logic [NS-1:0] rnd_word();
    return NS'({$urandom, $urandom});
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, wrong, lost;
    rst_n = 0; tsv_fail = '0; sig_in = '0;
    tx_scan_en = 0; tx_scan_in = 0; tx_fuse_prog = 0;
    rx_scan_en = 0; rx_scan_in = 0; rx_fuse_prog = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. fault-free stack, nothing programmed
    repeat (20) begin
      for (int b = 0; b < NB; b++) sig_in[b] = rnd_word();
      #1 chk(sig_out == sig_in, "fault-free stack passes all signals");
      n_pass_unrepaired++;
      @(negedge clk);
    end

    // 2. inject defects (cells chosen through the default spiral order)
    tsv_fail[1][cell_at(SPIRAL, 0)]      = 1'b1;  // head
    tsv_fail[2][cell_at(SPIRAL, NS - 1)] = 1'b1;  // last regular TSV
    tsv_fail[3][cell_at(SPIRAL, NS)]     = 1'b1;  // redundant TSV
    tsv_fail[4][cell_at(SPIRAL, 24)]     = 1'b1;  // middle
    tsv_fail[5][cell_at(SPIRAL, 7)]      = 1'b1;  // two in one block
    tsv_fail[5][cell_at(SPIRAL, 30)]     = 1'b1;
    for (int b = 6; b < NB; b++) tsv_fail[b][$urandom_range(NT - 1)] = 1'b1;

    // 3. connectivity test
    sig_in = '1;
    #1;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < NS; k++) if (!sig_out[b][k]) found[b].push_back(k);
      n_defect_found += found[b].size();
    end
    chk(found[0].size() == 0, "block 0 has no defect");
    chk(found[1].size() == 1 && found[1][0] == 0, "head defect found");
    chk(found[2].size() == 1 && found[2][0] == NS - 1, "last TSV defect found");
    chk(found[3].size() == 0, "redundant TSV defect is invisible");
    chk(found[5].size() == 2, "both defects of block 5 found");
    if (found[3].size() == 0) n_redundant_defect++;

    // 4. repair patterns: repair the first failure of each block
    tx_pat = '0; rx_pat = '0;
    for (int b = 0; b < NB; b++) begin
      repaired_pos[b] = found[b].size() > 0 ? found[b][0] : NS;
      if (found[b].size() > 1) n_unrepairable++;
      for (int i = 1; i < NS; i++) tx_pat[b*(NS-1) + i - 1] = (i > repaired_pos[b]);
      for (int i = 0; i < NS; i++) rx_pat[b*NS + i]         = (i >= repaired_pos[b]);
    end

    // both chains shift together; the shorter one starts later
    cycles = 0;
    for (int t = RXB - 1; t >= 0; t--) begin
      @(negedge clk);
      rx_scan_en = 1; rx_scan_in = rx_pat[t];
      tx_scan_en = (t < TXB); tx_scan_in = (t < TXB) ? tx_pat[t] : 1'b0;
      @(posedge clk); cycles++;
    end
    @(negedge clk);
    rx_scan_en = 0; tx_scan_en = 0;
    chk(cycles == RXB, "receiver pattern loads in RX_BITS cycles");
    chk(rx_scan_out == rx_pat[RXB-1] && tx_scan_out == tx_pat[TXB-1],
        "scan-out shows the first bit shifted in");
    n_scan_load += 2;
    // loaded but not yet burnt: nothing is repaired yet
    sig_in = '1;
    #1 chk(sig_out[1][0] == 1'b0, "scan load alone does not switch MUXes");

    // burn the fuses, one-cycle strobe on both tiers
    @(negedge clk);
    tx_fuse_prog = 1; rx_fuse_prog = 1;
    #1 chk(sig_out[1][0] == 1'b0, "no repair before the strobe edge");
    @(negedge clk);
    tx_fuse_prog = 0; rx_fuse_prog = 0;
    n_fuse_program += 2;

    // 5. check the repaired interface, then again after a reset
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin
        rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
      end
      repeat (30) begin
        for (int b = 0; b < NB; b++) sig_in[b] = rnd_word();
        #1;
        for (int b = 0; b < NB; b++) begin
          if (found[b].size() <= 1) begin
            chk(sig_out[b] == sig_in[b], $sformatf("block %0d delivers every signal", b));
          end else begin
            // after the shift, the signal now routed over the second failed
            // TSV (one position before it) is lost; everything else arrives
            wrong = 0; lost = found[b][1] - 1;
            for (int k = 0; k < NS; k++)
              if (k != lost && sig_out[b][k] != sig_in[b][k]) wrong++;
            chk(wrong == 0, "double-defect block loses only one signal");
          end
        end
        @(negedge clk);
      end
      // the unrepaired signal of block 5 is really lost
      sig_in = '1;
      #1 chk(sig_out[5][found[5][1] - 1] == 1'b0, "second defect remains");
      if (pass == 1) n_kept_after_reset++;
    end
    for (int b = 0; b < NB; b++)
      if (repaired_pos[b] < NS) begin
        n_shift_repair++;
        if (repaired_pos[b] == 0)      n_head_repair++;
        if (repaired_pos[b] == NS - 1) n_tail_repair++;
      end

    $display("mechanisms: unrepaired pass %0d, defects found %0d, redundant-TSV defect %0d,",
             n_pass_unrepaired, n_defect_found, n_redundant_defect);
    $display("  shift repairs %0d (head %0d, tail %0d), unrepairable blocks %0d,",
             n_shift_repair, n_head_repair, n_tail_repair, n_unrepairable);
    $display("  scan loads %0d, fuse programs %0d, repair kept after reset %0d",
             n_scan_load, n_fuse_program, n_kept_after_reset);
    chk(n_pass_unrepaired > 0,  "mechanism: unprogrammed pass-through");
    chk(n_defect_found > 0,     "mechanism: defect detection");
    chk(n_redundant_defect > 0, "mechanism: redundant TSV defect");
    chk(n_shift_repair > 0,     "mechanism: shift repair");
    chk(n_head_repair > 0,      "mechanism: head repair");
    chk(n_tail_repair > 0,      "mechanism: tail repair");
    chk(n_unrepairable > 0,     "mechanism: unrepairable chain");
    chk(n_scan_load > 0,        "mechanism: scan load");
    chk(n_fuse_program > 0,     "mechanism: fuse programming");
    chk(n_kept_after_reset > 0, "mechanism: fuses survive reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
