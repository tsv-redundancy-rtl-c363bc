// shift_counter: for one TSV-chain of NS regular TSVs plus the redundant one,
// repairs a single defect at every regular position in turn and counts, per
// signal, in how many of these cases the signal was moved off its own TSV
// (measured by failing its own TSV as well: a moved signal survives that).
// Used by tb_shift_probability.
module shift_counter #(
  parameter int unsigned NS = 10
) (
  output int  head_shifted,   // cases in which chain position 0 moved
  output int  total_shifted,  // sum over all positions
  output int  errors,         // repaired chain delivered a wrong signal
  output bit  done
);
  logic [NS-1:0] sig_in, sig_out;
  logic [NS-1:1] sel_tx;
  logic [NS-1:0] sel_rx;
  logic [NS:0]   drv, rcv, fail;

  tsv_chain_tx #(.NS(NS)) u_tx (.sig_in(sig_in), .sel(sel_tx), .tsv_drv(drv));
  for (genvar j = 0; j <= NS; j++) begin : g_tsv
    tsv u_tsv (.d(drv[j]), .fail(fail[j]), .q(rcv[j]));
  end
  tsv_chain_rx #(.NS(NS)) u_rx (.tsv_rcv(rcv), .sel(sel_rx), .sig_out(sig_out));

  initial begin
    head_shifted = 0; total_shifted = 0; errors = 0; done = 0;
    for (int f = 0; f < NS; f++) begin
      for (int i = 1; i < NS; i++) sel_tx[i] = (i > f);
      for (int i = 0; i < NS; i++) sel_rx[i] = (i >= f);
      fail = '0; fail[f] = 1'b1;
      sig_in = NS'({$urandom, $urandom, $urandom, $urandom});
      #1 if (sig_out != sig_in) errors++;
      sig_in = '1;
      for (int k = 0; k < NS; k++) begin
        fail[k] = 1'b1;
        #1;
        if (sig_out[k]) begin
          total_shifted++;
          if (k == 0) head_shifted++;
        end
        if (k != f) fail[k] = 1'b0;
      end
    end
    done = 1;
  end
endmodule
