// tsv_block_checker: exercises one tsv_block configuration for tb_tsv_block.
//
// The checker learns the chain order from the hardware alone: with no repair
// programmed, a defect at grid cell (r, c) breaks exactly the output whose
// chain position that TSV holds, or no output if it is the redundant TSV. From
// the learned order it checks the chaining rules: every position used once,
// consecutive positions on neighbouring cells, the redundant TSV and the head
// where the policy puts them. It then repairs a defect at every cell in turn,
// measures which signals moved off their own TSV (a signal has moved if it
// survives a second defect on its own TSV), and checks that two defects in one
// block are never both repaired.
module tsv_block_checker
  import tsv_pkg::*;
#(
  parameter int unsigned  ROWS  = 4,
  parameter int unsigned  COLS  = 5,
  parameter chain_style_e STYLE = SPIRAL,
  parameter bit           SHOW  = 1'b0   // print the shift statistics
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int NT = ROWS * COLS;
  localparam int NS = NT - 1;

  logic [NS-1:0] sig_in, sig_out;
  logic [NS-1:1] sel_tx;
  logic [NS-1:0] sel_rx;
  logic [NT-1:0] tsv_fail;

  tsv_block #(.ROWS(ROWS), .COLS(COLS), .STYLE(STYLE)) dut (.*);

  int pos[NT];      // chain position of each grid cell
  int cell_of[NT];  // grid cell of each chain position
  int shifted[NS];  // single-defect cases in which signal k moved

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0dx%0d %s] %s", ROWS, COLS, STYLE.name(), what);
    end
  endtask

  task automatic program_repair(int p);  // p = failed chain position
    for (int i = 1; i < NS; i++) sel_tx[i] = (i > p);
    for (int i = 0; i < NS; i++) sel_rx[i] = (i >= p);
  endtask

  function automatic bit on_edge(int cl);
    int r = cl / COLS, c = cl % COLS;
    return r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1;
  endfunction

  function automatic int ring(int cl);  // L-ring index around the corner
    int dr = ROWS - 1 - cl / COLS, dc = COLS - 1 - cl % COLS;
    return dr > dc ? dr : dc;
  endfunction

  initial begin
    int hits, found, nedge, r0, c0, r1, c1, a, b, bad, dmax, nring;
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < NT; k++) cell_of[k] = -1;

    // 1. learn the chain order
    sel_tx = '0; sel_rx = '0; sig_in = '1;
    for (int cl = 0; cl < NT; cl++) begin
      tsv_fail = '0; tsv_fail[cl] = 1'b1;
      #1;
      hits = 0; found = NS;
      for (int k = 0; k < NS; k++) if (!sig_out[k]) begin hits++; found = k; end
      chk(hits <= 1, $sformatf("one defect breaks at most one output (cl %0d)", cl));
      pos[cl] = found;
      chk(cell_of[found] == -1, $sformatf("position %0d used once", found));
      cell_of[found] = cl;
    end
    for (int k = 0; k < NT; k++) chk(cell_of[k] >= 0, $sformatf("position %0d present", k));

    // 2. consecutive chain positions are grid neighbours
    for (int k = 0; k + 1 < NT; k++) begin
      r0 = cell_of[k] / COLS;   c0 = cell_of[k] % COLS;
      r1 = cell_of[k+1] / COLS; c1 = cell_of[k+1] % COLS;
      chk((r0 - r1) * (r0 - r1) + (c0 - c1) * (c0 - c1) == 1,
          $sformatf("positions %0d and %0d adjacent", k, k + 1));
    end

    // 3. policy-specific placement of head and redundant TSV
    case (STYLE)
      SPIRAL: begin
        nedge = 0;
        for (int cl = 0; cl < NT; cl++) if (on_edge(cl)) nedge++;
        for (int cl = 0; cl < NT; cl++)
          if (on_edge(cl)) chk(pos[cl] < nedge, "boundary TSVs form the head");
        if (ROWS > 2 && COLS > 2) chk(!on_edge(cell_of[NS]), "redundant TSV inside the block");
      end
      SNAKE: begin
        chk(cell_of[NS] == NT - 1, "redundant TSV at the boundary-side corner");
        for (int c = 0; c < COLS; c++) chk(pos[c] < COLS, "row away from the boundary is the head");
      end
      default: begin
        chk(cell_of[NS] == NT - 1, "redundant TSV at the tier-corner cl");
        dmax = (ROWS > COLS ? ROWS : COLS) - 1;
        nring = 0;
        for (int cl = 0; cl < NT; cl++) if (ring(cl) == dmax) nring++;
        for (int cl = 0; cl < NT; cl++)
          if (ring(cl) == dmax) chk(pos[cl] < nring, "ring farthest from the corner is the head");
      end
    endcase

    // 4. repair every single defect; record which signals moved
    for (int k = 0; k < NS; k++) shifted[k] = 0;
    for (int cl = 0; cl < NT; cl++) begin
      tsv_fail = '0; tsv_fail[cl] = 1'b1;
      program_repair(pos[cl]);
      repeat (4) begin
        sig_in = NS'({$urandom, $urandom, $urandom, $urandom});
        #1 chk(sig_out == sig_in, $sformatf("defect at cl %0d repaired", cl));
      end
      if (pos[cl] < NS) begin
        sig_in = '1;
        for (int k = 0; k < NS; k++) begin
          if (k != pos[cl]) tsv_fail[cell_of[k]] = 1'b1;
          #1;
          if (sig_out[k]) shifted[k]++;
          if (k != pos[cl]) tsv_fail[cell_of[k]] = 1'b0;
        end
      end
    end
    // Signal k moves whenever the defect lies at or before position k.
    for (int k = 0; k < NS; k++)
      chk(shifted[k] == k + 1, $sformatf("signal %0d moved in %0d of %0d cases", k, shifted[k], NS));
    if (SHOW)
      for (int k = 0; k < NS; k++)
        $display("  %0dx%0d %s chain position %0d: shifted in %0d/%0d single-defect cases",
                 ROWS, COLS, STYLE.name(), k, shifted[k], NS);

    // 5. two defects in one block: one of them stays broken
    bad = 0;
    for (int t = 0; t < 40; t++) begin
      a = $urandom_range(NT - 1); b = $urandom_range(NT - 1);
      if (a == b || pos[a] == NS || pos[b] == NS) continue;
      tsv_fail = '0; tsv_fail[a] = 1'b1; tsv_fail[b] = 1'b1;
      program_repair(pos[a] < pos[b] ? pos[a] : pos[b]);
      sig_in = '1;
      #1 chk(sig_out != sig_in, "second defect in one chain is not repaired");
      bad++;
    end
    chk(bad > 0, "double defects exercised");
    done = 1;
  end
endmodule
