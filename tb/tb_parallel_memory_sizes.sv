// tb_parallel_memory_sizes: the end-to-end test at other memory sizes. Runs
// pm_e2e_checker on parallel memories of N = 2, 8 and 16 modules (64 words each)
// side by side and sums their counts, so that the generic parts of the design
// (crossbar widths, skewing fields, scheme range) are exercised beyond the default
// four modules.
module tb_parallel_memory_sizes;
  localparam int unsigned NCFG = 3;
  localparam int unsigned NLOG [NCFG] = '{1, 3, 4};

  bit done     [NCFG];
  int checks_c [NCFG];
  int fails_c  [NCFG];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    pm_e2e_checker #(.N_LOG2(NLOG[c]), .DEPTH_LOG2(6), .DATA_W(8)) u_chk (
      .done(done[c]), .checks(checks_c[c]), .failures(fails_c[c])
    );
  end

  initial begin
    #5000000;
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
      $display("N=%0d: %0d checks, %0d failures", 2**NLOG[c], checks_c[c], fails_c[c]);
      checks   += checks_c[c];
      failures += fails_c[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
