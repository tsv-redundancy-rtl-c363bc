// tsv_block: one TSV block, a ROWS x COLS grid of TSVs forming a single
// TSV-chain with one redundant TSV.
//
// The block holds ROWS*COLS TSVs and carries NS = ROWS*COLS - 1 signals. The
// sender-tier MUXes (tsv_chain_tx) drive the chain, every TSV is a tsv model
// placed at a grid cell, and the receiver-tier MUXes (tsv_chain_rx) restore
// the signal order. The grid cell (r, c) hosts chain position
// tsv_pkg::chain_pos(STYLE, ROWS, COLS, r, c), so the chaining policy decides
// which physical TSV a signal uses and which neighbour it moves to when
// shifted; position NS is the redundant TSV. One failed TSV per block can be
// repaired; with two or more, at least one signal stays broken.
//
// Signals are numbered by chain position: sig_in[0]/sig_out[0] is the head of
// the chain and the safest place for a timing-critical signal, since it moves
// only if its own TSV fails.
//
// Interface: sig_in/sig_out the NS signals, sel_tx/sel_rx the MUX selects of
// the two tiers, tsv_fail[r*COLS + c] defect injection for the TSV at grid
// cell (r, c). Timing: combinational, two MUX levels plus the via.
// One chain per block with one redundant TSV follows the source design; the
// 5 x 10 default grid (50 TSVs, the largest block size the source allows for
// 90 % recovery) is this implementation's choice of shape.
module tsv_block
  import tsv_pkg::*;
#(
  parameter int unsigned  ROWS  = 5,
  parameter int unsigned  COLS  = 10,
  parameter chain_style_e STYLE = SPIRAL,
  localparam int unsigned NT    = ROWS * COLS,  // TSVs, redundant included
  localparam int unsigned NS    = NT - 1        // signals
) (
  input  logic [NS-1:0] sig_in,
  input  logic [NS-1:1] sel_tx,
  input  logic [NS-1:0] sel_rx,
  input  logic [NT-1:0] tsv_fail,
  output logic [NS-1:0] sig_out
);

  logic [NT-1:0] tsv_drv;  // by chain position, sender side
  logic [NT-1:0] tsv_rcv;  // by chain position, receiver side

  tsv_chain_tx #(.NS(NS)) u_tx (
    .sig_in (sig_in),
    .sel    (sel_tx),
    .tsv_drv(tsv_drv)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int P = chain_pos(STYLE, ROWS, COLS, r, c);
      if (P < 0 || P >= NT) begin : g_bad
        $error("tsv_block: chain position out of range");
      end
      tsv u_tsv (
        .d   (tsv_drv[P]),
        .fail(tsv_fail[r*COLS + c]),
        .q   (tsv_rcv[P])
      );
    end
  end

  tsv_chain_rx #(.NS(NS)) u_rx (
    .tsv_rcv(tsv_rcv),
    .sel    (sel_rx),
    .sig_out(sig_out)
  );

endmodule
