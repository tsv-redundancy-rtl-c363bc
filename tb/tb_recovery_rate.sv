// tb_recovery_rate: recovery rate of a 500-TSV tier with two failed TSVs, for
// blocks of 25, 50, 100 and 250 TSVs (one redundant TSV each).
//
// Every one of the C(500,2) = 124750 placements of two defects is applied to
// the hardware and repaired. Two defects are repairable exactly when they lie
// in different blocks, so the expected count is C(#blocks,2) * (TSVs per
// block)^2: 118750 (95.19 %) for 20 blocks of 25, 112500 (90.18 %) for 10
// blocks of 50, 100000 (80.16 %) for 5 blocks of 100 and 62500 (50.10 %) for
// 2 blocks of 250. With the 50-TSV rate the testbench also prints the yield of
// a tier whose TSVs fail independently with probability 1e-4:
// P(0 fail) + P(1 fail) + P(2 fail) * rate, about 99.986 %.
module tb_recovery_rate;
  localparam int NCFG = 4;
  localparam int N    = 500;
  longint pairs[NCFG], rec[NCFG];
  bit     dn[NCFG];
  int checks = 0, failures = 0;

  recovery_counter #(.NB(20), .ROWS(5),  .COLS(5))  u25  (pairs[0], rec[0], dn[0]);
  recovery_counter #(.NB(10), .ROWS(5),  .COLS(10)) u50  (pairs[1], rec[1], dn[1]);
  recovery_counter #(.NB(5),  .ROWS(10), .COLS(10)) u100 (pairs[2], rec[2], dn[2]);
  recovery_counter #(.NB(2),  .ROWS(10), .COLS(25)) u250 (pairs[3], rec[3], dn[3]);

  const int nb[NCFG] = '{20, 10, 5, 2};

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate50, f, p0, p1, p2, yield;
    longint expect_rec;
    #1;
    wait (dn.and());
    for (int i = 0; i < NCFG; i++) begin
      expect_rec = longint'(nb[i] * (nb[i] - 1) / 2) * (N / nb[i]) * (N / nb[i]);
      chk(pairs[i] == N * (N - 1) / 2, "all pairs tried");
      chk(rec[i] == expect_rec, $sformatf("%0d TSVs per block: %0d recovered, expected %0d",
                                          N / nb[i], rec[i], expect_rec));
      $display("%0d blocks of %0d TSVs: %0d of %0d two-defect cases recovered (%0.2f %%)",
               nb[i], N / nb[i], rec[i], pairs[i], 100.0 * rec[i] / pairs[i]);
    end
    chk(100.0 * rec[0] / pairs[0] >= 95.0, "25-TSV blocks reach 95 %");
    chk(100.0 * rec[1] / pairs[1] >= 90.0, "50-TSV blocks reach 90 %");
    chk(100.0 * rec[2] / pairs[2] <  90.0, "100-TSV blocks miss 90 %");
    rate50 = real'(rec[1]) / real'(pairs[1]);
    f  = 1.0e-4;
    p0 = (1.0 - f) ** N;
    p1 = N * f * (1.0 - f) ** (N - 1);
    p2 = (N * (N - 1) / 2) * f * f * (1.0 - f) ** (N - 2);
    yield = p0 + p1 + p2 * rate50;
    $display("P0 %0.4f %%, P1 %0.4f %%, P2 %0.4f %%, yield with 50-TSV blocks %0.5f %%",
             100 * p0, 100 * p1, 100 * p2, 100 * yield);
    chk(yield > 0.9998 && yield < 0.9999, "tier yield near 99.986 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
