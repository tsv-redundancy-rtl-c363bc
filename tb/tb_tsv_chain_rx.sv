// tb_tsv_chain_rx: self-checking test of the receiver-side shift MUXes.
//
// Random TSV values are applied under every repair setting and under random
// select patterns; each output is compared with a reference that says which
// TSV it must read. A second pass models a complete chain: signals are placed
// on the TSVs as the sender would after a repair of TSV f, TSV f is forced to
// a wrong value, and all outputs must still equal the signals sent.
module tb_tsv_chain_rx;
  localparam int unsigned NS = 49;

  logic [NS:0]   tsv_rcv;
  logic [NS-1:0] sel;
  logic [NS-1:0] sig_out;
  int checks = 0, failures = 0;

  tsv_chain_rx #(.NS(NS)) dut (.tsv_rcv(tsv_rcv), .sel(sel), .sig_out(sig_out));

  function automatic logic [NS-1:0] expect_out(logic [NS:0] t, logic [NS-1:0] sl);
    logic [NS-1:0] e;
    for (int i = 0; i < NS; i++) e[i] = t[i + (sl[i] ? 1 : 0)];
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NS-1:0] sent;
    repeat (300) begin
      sel = {$urandom, $urandom};
      tsv_rcv = {$urandom, $urandom};
      #1; checks++;
      if (sig_out !== expect_out(tsv_rcv, sel)) begin
        failures++;
        $display("FAIL sel=%h tsv=%h out=%h", sel, tsv_rcv, sig_out);
      end
    end
    for (int f = 0; f < NS; f++) begin
      for (int i = 0; i < NS; i++) sel[i] = (i >= f);
      repeat (8) begin
        sent = {$urandom, $urandom};
        for (int j = 0; j <= NS; j++)
          tsv_rcv[j] = (j < f) ? sent[j] : (j == f) ? ~sent[j] : sent[j-1];
        #1; checks++;
        if (sig_out !== sent) begin
          failures++;
          $display("FAIL repair f=%0d sent=%h out=%h", f, sent, sig_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
