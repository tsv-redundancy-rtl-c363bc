// recovery_counter: counts, for one tier of NB tsv_blocks of ROWS x COLS TSVs,
// how many of all possible placements of two failed TSVs the redundancy can
// repair, for tb_recovery_rate.
//
// For each pair of TSVs of the tier, both are made to fail, each affected block
// gets the repair of its lowest failed chain position (the chain order is first
// learned from the hardware with single defects), all ones are driven, and the
// pair counts as recovered when every output reads one.
module recovery_counter
  import tsv_pkg::*;
#(
  parameter int unsigned NB   = 10,
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 10
) (
  output longint pairs,
  output longint recovered,
  output bit     done
);
  localparam int NT = ROWS * COLS;
  localparam int NS = NT - 1;
  localparam int N  = NB * NT;

  logic [NB-1:0][NS-1:0] sig_in, sig_out;
  logic [NB-1:0][NS-1:1] sel_tx;
  logic [NB-1:0][NS-1:0] sel_rx;
  logic [NB-1:0][NT-1:0] tsv_fail;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    tsv_block #(.ROWS(ROWS), .COLS(COLS), .STYLE(SPIRAL)) u_blk (
      .sig_in(sig_in[b]), .sel_tx(sel_tx[b]), .sel_rx(sel_rx[b]),
      .tsv_fail(tsv_fail[b]), .sig_out(sig_out[b]));
  end

  int pos[NT];  // chain position of each grid cell (same in every block)

  task automatic set_repair(int b, int p);
    for (int i = 1; i < NS; i++) sel_tx[b][i] = (i > p);
    for (int i = 0; i < NS; i++) sel_rx[b][i] = (i >= p);
  endtask

  initial begin
    int bx, cx, by, cy, p;
    pairs = 0; recovered = 0; done = 0;
    sig_in = '1; sel_tx = '0; sel_rx = '0; tsv_fail = '0;
    for (int c = 0; c < NT; c++) begin
      tsv_fail[0] = '0; tsv_fail[0][c] = 1'b1;
      #1;
      pos[c] = NS;
      for (int k = 0; k < NS; k++) if (!sig_out[0][k]) pos[c] = k;
    end
    tsv_fail = '0;
    for (int x = 0; x < N; x++) begin
      bx = x / NT; cx = x % NT;
      for (int y = x + 1; y < N; y++) begin
        by = y / NT; cy = y % NT;
        tsv_fail[bx][cx] = 1'b1; tsv_fail[by][cy] = 1'b1;
        if (bx == by) begin
          p = pos[cx] < pos[cy] ? pos[cx] : pos[cy];
          set_repair(bx, p);
        end else begin
          set_repair(bx, pos[cx]);
          set_repair(by, pos[cy]);
        end
        #1;
        pairs++;
        if (sig_out == sig_in) recovered++;
        tsv_fail[bx] = '0; tsv_fail[by] = '0;
        sel_tx[bx] = '0; sel_rx[bx] = '0; sel_tx[by] = '0; sel_rx[by] = '0;
      end
    end
    done = 1;
  end
endmodule
