// tsv_redundancy_top: redundant TSV interface between two stacked tiers.
//
// NUM_BLOCKS TSV blocks of ROWS x COLS TSVs (default 10 blocks of 50, i.e. 500
// TSVs per tier) carry signals from a sender tier up to a receiver tier. Each
// block is one TSV-chain with a single redundant TSV, so each block can repair
// one failed TSV and NUM_BLOCKS*(ROWS*COLS-1) signals are carried (490 by
// default).
//
// Every shift MUX is set by its own e-fuse. Each tier has a scan chain and an
// e-fuse array of its own: TX_BITS fuses for the sender-side MUXes and RX_BITS
// for the receiver-side MUXes. Unprogrammed fuses read 0 and leave every
// signal on its own TSV. After the TSVs have been tested, the repair pattern is
// shifted in (one bit per clock while *_scan_en is high, the bit for the
// highest fuse index first) and a one-cycle *_fuse_prog pulse blows the fuses
// whose bit is 1; the MUXes switch from the next clock edge on.
//
// Fuse map, for a failed TSV at chain position f of block b (f < NS):
//   sender   fuse b*(NS-1) + (i-1) = 1 for i = f+1 .. NS-1  (TSV i carries
//            signal i-1)
//   receiver fuse b*NS + i         = 1 for i = f .. NS-1    (output i reads
//            TSV i+1)
// A failed redundant TSV needs no fuse.
//
// Interface: sig_in[b][k]/sig_out[b][k] is signal k (chain position k, 0 =
// head) of block b; tsv_fail[b][r*COLS+c] injects a defect into the TSV at
// grid cell (r, c) of block b (simulation only). The data path is
// combinational; scan and fuse programming are synchronous to clk, and
// rst_n (asynchronous, active low) clears the scan chains but not the fuses.
// The scan-programmed fuse per MUX follows the source design; the separate
// chain per tier, the fuse order and the programming strobe are this
// implementation's choices.
module tsv_redundancy_top
  import tsv_pkg::*;
#(
  parameter int unsigned  NUM_BLOCKS = 10,
  parameter int unsigned  ROWS       = 5,
  parameter int unsigned  COLS       = 10,
  parameter chain_style_e STYLE [NUM_BLOCKS] = '{default: SPIRAL},
  localparam int unsigned NT      = ROWS * COLS,
  localparam int unsigned NS      = NT - 1,
  localparam int unsigned TX_BITS = NUM_BLOCKS * (NS - 1),
  localparam int unsigned RX_BITS = NUM_BLOCKS * NS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // data path
  input  logic [NUM_BLOCKS-1:0][NS-1:0]  sig_in,
  output logic [NUM_BLOCKS-1:0][NS-1:0]  sig_out,
  input  logic [NUM_BLOCKS-1:0][NT-1:0]  tsv_fail,
  // sender tier: repair programming
  input  logic                           tx_scan_en,
  input  logic                           tx_scan_in,
  output logic                           tx_scan_out,
  input  logic                           tx_fuse_prog,
  // receiver tier: repair programming
  input  logic                           rx_scan_en,
  input  logic                           rx_scan_in,
  output logic                           rx_scan_out,
  input  logic                           rx_fuse_prog
);

  logic [TX_BITS-1:0] tx_scan_q, tx_fuse;
  logic [RX_BITS-1:0] rx_scan_q, rx_fuse;

  // Sender tier
  scan_chain #(.LEN(TX_BITS)) u_tx_scan (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(tx_scan_en),
    .scan_in (tx_scan_in),
    .scan_out(tx_scan_out),
    .q       (tx_scan_q)
  );

  efuse_array #(.NBITS(TX_BITS)) u_tx_fuse (
    .clk      (clk),
    .prog     (tx_fuse_prog),
    .prog_data(tx_scan_q),
    .fuse     (tx_fuse)
  );

  // Receiver tier
  scan_chain #(.LEN(RX_BITS)) u_rx_scan (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(rx_scan_en),
    .scan_in (rx_scan_in),
    .scan_out(rx_scan_out),
    .q       (rx_scan_q)
  );

  efuse_array #(.NBITS(RX_BITS)) u_rx_fuse (
    .clk      (clk),
    .prog     (rx_fuse_prog),
    .prog_data(rx_scan_q),
    .fuse     (rx_fuse)
  );

  // TSV blocks
  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    tsv_block #(.ROWS(ROWS), .COLS(COLS), .STYLE(STYLE[b])) u_blk (
      .sig_in  (sig_in[b]),
      .sel_tx  (tx_fuse[b*(NS-1) +: (NS-1)]),
      .sel_rx  (rx_fuse[b*NS +: NS]),
      .tsv_fail(tsv_fail[b]),
      .sig_out (sig_out[b])
    );
  end

  // The fuse programming strobe must not coincide with shifting, or the
  // pattern blown would be a half-shifted one.
  property p_no_prog_while_shifting(logic en, logic prog);
    @(posedge clk) !(en && prog);
  endproperty
  a_tx_prog: assert property (p_no_prog_while_shifting(tx_scan_en, tx_fuse_prog));
  a_rx_prog: assert property (p_no_prog_while_shifting(rx_scan_en, rx_fuse_prog));

endmodule
