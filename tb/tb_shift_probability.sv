// tb_shift_probability: probability that a timing-critical signal is moved to
// a longer path, for TSV-chains of 10 to 100 regular TSVs and one defect
// placed with equal probability on any regular TSV.
//   timing-aware placement (signal at the head):  1/n
//   unaware placement (any position equally):     (n+1)/(2n), above 50 %
// Averaged over the ten chain lengths, the head placement gives 2.93 %. The
// counts come from the repaired hardware and are compared with these
// formulas.
module tb_shift_probability;
  localparam int NC = 10;
  int hs[NC], ts[NC], er[NC];
  bit dn[NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_len
    shift_counter #(.NS(10 * (i + 1))) u_cnt (hs[i], ts[i], er[i], dn[i]);
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real aware, unaware, avg_aware, avg_unaware;
    int n;
    #1;
    wait (dn.and());
    avg_aware = 0; avg_unaware = 0;
    for (int i = 0; i < NC; i++) begin
      n = 10 * (i + 1);
      chk(er[i] == 0, $sformatf("chain of %0d repairs every single defect", n));
      chk(hs[i] == 1, $sformatf("chain of %0d: head moves only for its own defect", n));
      chk(2 * ts[i] == n * (n + 1), $sformatf("chain of %0d: n(n+1)/2 moves in total", n));
      aware   = real'(hs[i]) / n;
      unaware = real'(ts[i]) / (n * n);
      chk(unaware > 0.5, "unaware placement moves the signal more than half the time");
      $display("n=%3d  timing aware %6.2f %%  unaware %6.2f %%", n, 100 * aware, 100 * unaware);
      avg_aware += aware / NC; avg_unaware += unaware / NC;
    end
    $display("average: timing aware %0.2f %%, unaware %0.2f %%", 100 * avg_aware, 100 * avg_unaware);
    chk(avg_aware > 0.0292 && avg_aware < 0.0294, "average head probability 2.93 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
