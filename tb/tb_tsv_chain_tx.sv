// tb_tsv_chain_tx: self-checking test of the sender-side shift MUXes.
//
// For every repair setting (no fault, and a failed TSV at each chain position)
// and for random select patterns, random signal words are applied and every
// TSV drive is compared with a reference that maps TSV j to the signal it must
// carry: j itself below the failure, j-1 from the failure on, the last signal
// on the redundant TSV. Combinational, so each check follows a 1 ns settle.
module tb_tsv_chain_tx;
  localparam int unsigned NS = 49;

  logic [NS-1:0] sig_in;
  logic [NS-1:1] sel;
  logic [NS:0]   tsv_drv;
  int checks = 0, failures = 0;

  tsv_chain_tx #(.NS(NS)) dut (.sig_in(sig_in), .sel(sel), .tsv_drv(tsv_drv));

  function automatic logic [NS:0] expect_drv(logic [NS-1:0] s, logic [NS-1:1] sl);
    logic [NS:0] e;
    for (int j = 0; j <= NS; j++) begin
      int src;
      if (j == NS)             src = NS - 1;
      else if (j > 0 && sl[j]) src = j - 1;
      else                     src = j;
      e[j] = s[src];
    end
    return e;
  endfunction

  task automatic check(string what);
    #1;
    checks++;
    if (tsv_drv !== expect_drv(sig_in, sel)) begin
      failures++;
      $display("FAIL %s: sel=%h in=%h drv=%h exp=%h", what, sel, sig_in, tsv_drv,
               expect_drv(sig_in, sel));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Repair settings: fault at f shifts TSVs f+1 .. NS-1 (f = NS: none).
    for (int f = 0; f <= NS; f++) begin
      for (int i = 1; i < NS; i++) sel[i] = (i > f);
      repeat (8) begin
        sig_in = {$urandom, $urandom};
        check($sformatf("repair f=%0d", f));
      end
      // signal f must now sit on TSV f+1, with a walking one
      if (f < NS) begin
        sig_in = '0; sig_in[f] = 1'b1;
        #1; checks++;
        if (tsv_drv[f+1] !== 1'b1) begin
          failures++; $display("FAIL signal %0d not on TSV %0d", f, f+1);
        end
      end
    end
    // Arbitrary select patterns
    repeat (200) begin
      sel    = {$urandom, $urandom};
      sig_in = {$urandom, $urandom};
      check("random sel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
