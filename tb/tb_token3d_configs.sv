// tb_token3d_configs: the stack configurations evaluated for the power
// balancing — 2 and 4 layers with 4, 8 and 16 cores — each run end to end
// in its own token3d_harness (stand-in cores, thermal stand-in, reference
// models and mechanism coverage, see token3d_harness).  Bucket epoch and
// leakage window are shortened to 20 000 and 2 000 cycles so that every
// configuration sees two re-bucketings; everything else is at its default.
// Passes when every configuration reports no failure and every tracked
// mechanism occurred in each.
module tb_token3d_configs;

  localparam int unsigned EPOCH = 20_000, WIN = 2_000;
  localparam int NCFG = 6;
  localparam int CORES  [NCFG] = '{4, 8, 16, 4, 8, 16};
  localparam int LAYERS [NCFG] = '{2, 2, 2, 4, 4, 4};

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk [NCFG], fl [NCFG], unc [NCFG];
  logic done [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    token3d_harness #(
      .N(CORES[g]), .NL(LAYERS[g]), .EPOCH(EPOCH), .WIN(WIN)
    ) u_h (
      .clk, .checks(chk[g]), .failures(fl[g]), .uncovered(unc[g]), .done(done[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3 * EPOCH) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCFG; g++) if (!done[g]) all = 0;
    end while (!all);
    for (int g = 0; g < NCFG; g++) begin
      $display("%0d layers, %0d cores: checks=%0d failures=%0d mechanisms missing=%0d",
               LAYERS[g], CORES[g], chk[g], fl[g], unc[g]);
      checks   += chk[g] + 1;
      failures += fl[g];
      if (chk[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
