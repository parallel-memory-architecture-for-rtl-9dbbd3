// tb_stride_sweep: the conflict free claim across memory sizes. Runs
// stride_sweep_checker for N = 2, 4, 8, 16, 32 and 64 modules (each with 64
// words per module) in parallel and sums their checks: every stride sigma * 2**s
// that fits the location space must be conflict free from every scanning point
// under the scheme selected by a scheme stride with the same s.
module tb_stride_sweep;
  localparam int unsigned NCFG = 6;

  bit done     [NCFG];
  int checks_c [NCFG];
  int fails_c  [NCFG];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    stride_sweep_checker #(.N_LOG2(c + 1), .DEPTH_LOG2(6)) u_chk (
      .done(done[c]), .checks(checks_c[c]), .failures(fails_c[c])
    );
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #10;
      all_done = 1;
      for (int c = 0; c < NCFG; c++) all_done &= done[c];
    end while (!all_done);
    for (int c = 0; c < NCFG; c++) begin
      $display("N=%0d: %0d checks, %0d failures", 2**(c + 1), checks_c[c], fails_c[c]);
      checks   += checks_c[c];
      failures += fails_c[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
