// tsv_chain_tx: sender-tier shift multiplexers of one TSV-chain.
//
// A TSV-chain carries NS signals over NS+1 TSVs; TSV NS is the redundant TSV at
// the tail of the chain. Every regular TSV i except the head (i = 0) has a
// 2:1 MUX in front of it: with sel[i] = 0 it carries its own signal sig_in[i],
// with sel[i] = 1 the signal of its neighbour towards the head, sig_in[i-1].
// The redundant TSV is always driven with the last signal sig_in[NS-1]. To
// repair a failed TSV f, the select lines of TSVs f+1 .. NS-1 are set, so that
// signals f .. NS-1 each move one TSV towards the tail (the receiver side,
// tsv_chain_rx, undoes the move). With all selects 0 (the unprogrammed fuse
// state) every signal uses its own TSV and the redundant TSV carries a copy of
// the last signal.
//
// Interface: sig_in[NS] signals from the sender tier, sel[NS-1:1] MUX selects
// (from the e-fuses), tsv_drv[NS:0] drives onto the TSVs (index NS = redundant).
// Timing: purely combinational, one MUX level. The per-TSV shift buffers of the
// physical design are plain wires here. The MUX arrangement follows the source
// architecture; the select-line numbering is this implementation's.
module tsv_chain_tx #(
  parameter int unsigned NS = 49  // signals per chain (TSVs in the block - 1)
) (
  input  logic [NS-1:0] sig_in,
  input  logic [NS-1:1] sel,
  output logic [NS:0]   tsv_drv
);

  always_comb begin
    tsv_drv[0]  = sig_in[0];
    for (int unsigned i = 1; i < NS; i++)
      tsv_drv[i] = sel[i] ? sig_in[i-1] : sig_in[i];
    tsv_drv[NS] = sig_in[NS-1];
  end

  initial assert (NS >= 2) else $error("tsv_chain_tx: NS must be at least 2");

endmodule
