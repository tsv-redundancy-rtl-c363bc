// tsv_chain_rx: receiver-tier shift multiplexers of one TSV-chain.
//
// Each output sig_out[i] has a 2:1 MUX: with sel[i] = 0 it takes TSV i, with
// sel[i] = 1 it takes TSV i+1, the neighbour towards the tail. The last output
// sig_out[NS-1] takes the redundant TSV (index NS) when shifted. To repair a
// failed TSV f, sel[f] .. sel[NS-1] are set: output f skips the failed TSV and
// every later output follows its signal one TSV down the chain, matching
// tsv_chain_tx. The failed TSV's own value is then never used.
//
// Interface: tsv_rcv[NS:0] values landing from the TSVs (index NS = redundant),
// sel[NS-1:0] MUX selects (from the e-fuses), sig_out[NS] to the receiver tier.
// Timing: purely combinational, one MUX level. The MUX arrangement follows the
// source architecture; the select-line numbering is this implementation's.
module tsv_chain_rx #(
  parameter int unsigned NS = 49  // signals per chain (TSVs in the block - 1)
) (
  input  logic [NS:0]   tsv_rcv,
  input  logic [NS-1:0] sel,
  output logic [NS-1:0] sig_out
);

  always_comb
    for (int unsigned i = 0; i < NS; i++)
      sig_out[i] = sel[i] ? tsv_rcv[i+1] : tsv_rcv[i];

  initial assert (NS >= 2) else $error("tsv_chain_rx: NS must be at least 2");

endmodule
