// tb_tmbox_workloads: the monitored system at the sizes and contention levels
// it is meant for, all in one simulation.
//
// Core-count sweep: the complete run of the end-to-end test (conflicting
// transactions on a shared address pool, host-side rebuild and checking of
// every core's event stream) repeated with 1, 2, 4 and 16 cores; 8 cores is
// the full-size end-to-end test. With one core there is nobody to conflict
// with, so it must see no invalidation abort and no refused lock.
//
// Contention levels: a 4-core application run three times with the shared
// pool shrinking from 1000 to 160 to 24 addresses, as an application whose
// transactions collide more and more often. The abort count must rise from
// one level to the next, and the low level must still commit.
//
// Each run has its own clock and reset (tmbox_mon_env). The harness and the
// sizes of the pools are this testbench's own choice.
module tb_tmbox_workloads;

  localparam int NRUN = 7;
  localparam int CORES [NRUN] = '{1, 2, 4, 16, 4, 4, 4};
  localparam int POOLS [NRUN] = '{160, 160, 160, 160, 1000, 160, 24};
  localparam bit STALL [NRUN] = '{0, 0, 0, 0, 1, 1, 1};
  localparam int LINK  [NRUN] = '{4, 4, 4, 2, 4, 4, 4};

  bit done_all [NRUN];
  int r_checks [NRUN], r_failures [NRUN], r_commit [NRUN], r_abort [NRUN];
  int r_inv_abort [NRUN], r_retry [NRUN], r_cycles [NRUN], r_peak_log [NRUN], r_drops [NRUN];

  int checks = 0, failures = 0;

  for (genvar i = 0; i < NRUN; i++) begin : g_run
    tmbox_mon_env #(.N(CORES[i]), .NTX(8), .POOL(POOLS[i]), .HOST_STALLS(STALL[i]), .LINK_CYCLES(LINK[i])) u_env (
      .done_all    (done_all[i]),
      .checks      (r_checks[i]),
      .failures    (r_failures[i]),
      .n_commit    (r_commit[i]),
      .n_abort     (r_abort[i]),
      .n_inv_abort (r_inv_abort[i]),
      .n_retry     (r_retry[i]),
      .n_cycles    (r_cycles[i]),
      .n_peak_log  (r_peak_log[i]),
      .n_drops     (r_drops[i])
    );
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1us;
      all = 1;
      foreach (done_all[i]) all &= done_all[i];
    end while (!all);

    foreach (done_all[i]) begin
      checks   += r_checks[i];
      failures += r_failures[i];
      $display("run %0d: %0d cores, pool %0d: commits=%0d aborts=%0d (invalidation %0d) lock refusals=%0d peak log=%0d cycles=%0d",
               i, CORES[i], POOLS[i], r_commit[i], r_abort[i], r_inv_abort[i], r_retry[i],
               r_peak_log[i], r_cycles[i]);
      check($sformatf("run %0d every core committed", i), r_commit[i] >= CORES[i]);
      check($sformatf("run %0d log never near full", i), r_peak_log[i] <= 8);
    end

    // one core: no other core to conflict with or to hold the lock
    check("1 core: no invalidation abort", r_inv_abort[0] == 0);
    check("1 core: no lock refusal", r_retry[0] == 0);
    // 16 cores: every CPU ID in use, conflicts and lock contention happen
    check("16 cores: invalidation aborts", r_inv_abort[3] > 0);
    check("16 cores: lock refusals", r_retry[3] > 0);
    // contention levels
    check("contention rises low -> medium", r_inv_abort[4] < r_inv_abort[5]);
    check("contention rises medium -> high", r_inv_abort[5] < r_inv_abort[6]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
