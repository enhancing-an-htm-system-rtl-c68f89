// tb_event_gen: self-checking test of the TM state machine and its events.
//
// Drives transactional requests, TM-unit flags and lock replies cycle by
// cycle and checks, in every cycle, the emitted event, its data and the
// control pulses against the expected sequence: START, read-only commit,
// commit with a refused and then a granted lock, software abort, abort after
// a matching invalidation (INVALIDATION event carries the sender ID), capacity
// abort, and an invalidation that coincides with a state-machine event.
//
// The expected transitions and events follow the published state machine;
// the abort-cause codes, the conflict handling and the ordering of
// invalidation events are this implementation's own and tested as such.
module tb_event_gen;
  import tmmon_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic op_valid;
  tm_op_e op;
  logic ready, tx_active, tx_committed, tx_aborted;
  logic empty_writeset, conflict, capacity, inv_hit;
  logic [CPU_W-1:0] inv_src;
  logic acq, other;
  logic send_try_lock, start_tx, invalidate_htm, write_tx_data;
  ev_type_e ev_type;
  logic [EDATA_W-1:0] ev_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_gen dut (
    .clk, .rst, .op_valid, .op, .ready, .tx_active, .tx_committed, .tx_aborted,
    .empty_writeset, .conflict, .capacity, .inv_hit, .inv_src,
    .acquired_bus_lock (acq), .other_core_owns_bus_lock (other),
    .send_try_lock, .start_tx, .invalidate_htm, .write_tx_data,
    .ev_type, .ev_data
  );

  task automatic step();
    @(posedge clk); #1;
    op_valid = 1'b0; op = TM_NONE; inv_hit = 1'b0; acq = 1'b0; other = 1'b0;
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ev=%0d data=%0d t=%0t", what, ev_type, ev_data, $time);
    end
  endtask

  task automatic expect_ev(string what, ev_type_e t, logic [EDATA_W-1:0] d = '0);
    #1;
    check(what, ev_type == t && (t == EV_NONE || ev_data == d));
  endtask

  task automatic do_op(tm_op_e o);
    op_valid = 1'b1; op = o;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; op_valid = 0; op = TM_NONE; empty_writeset = 1; conflict = 0;
    capacity = 0; inv_hit = 0; inv_src = '0; acq = 0; other = 0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    expect_ev("idle", EV_NONE);
    check("ready after reset", ready && !tx_active);

    // 1) START
    do_op(TM_START);
    expect_ev("start", EV_START);
    check("start_tx pulse", start_tx);
    step();
    check("tx active", tx_active && ready);
    expect_ev("no event after start", EV_NONE);

    // 2) read-only commit: READY -> TM0 -> READY
    empty_writeset = 1;
    do_op(TM_COMMIT);
    expect_ev("commit request is silent", EV_NONE);
    step();
    check("in TM0", !ready);
    expect_ev("readonly", EV_READONLY);
    check("readonly clears htm and commits", invalidate_htm && tx_committed && !send_try_lock);
    step();
    check("back to ready", ready && !tx_active);

    // 3) commit with lock: refused once, then granted
    do_op(TM_START); step();
    empty_writeset = 0;
    do_op(TM_COMMIT); step();
    expect_ev("before_lock", EV_BEFORE_LOCK);
    check("try lock sent", send_try_lock);
    step();
    expect_ev("waiting in TM1", EV_NONE);
    step();
    expect_ev("still waiting", EV_NONE);
    other = 1;
    expect_ev("retry_lock", EV_RETRY_LOCK);
    step();
    expect_ev("before_lock again", EV_BEFORE_LOCK);
    check("try lock resent", send_try_lock);
    step();
    acq = 1;
    expect_ev("after_lock", EV_AFTER_LOCK);
    step();
    expect_ev("commit", EV_COMMIT);
    check("write back + committed", write_tx_data && tx_committed && !tx_aborted);
    step();
    check("ready after commit", ready && !tx_active);

    // 4) software abort
    do_op(TM_START); step();
    do_op(TM_ABORT); step();
    expect_ev("TM0 on abort is silent", EV_NONE);
    step();
    expect_ev("abort software", EV_ABORT, AB_SOFTWARE);
    check("abort clears htm", invalidate_htm && tx_aborted);
    step();

    // 5) abort after a matching invalidation from core 5
    do_op(TM_START); step();
    inv_hit = 1; inv_src = 4'd5;
    expect_ev("invalidation event", EV_INVALIDATION, 4'd5);
    step();
    conflict = 1;
    expect_ev("no event", EV_NONE);
    step();                         // TM0
    step();                         // TM2
    expect_ev("abort by invalidation", EV_ABORT, AB_INVALIDATION);
    step();
    conflict = 0;

    // 6) capacity abort
    do_op(TM_START); step();
    capacity = 1;
    step(); step();
    expect_ev("abort by capacity", EV_ABORT, AB_CAPACITY);
    step();
    capacity = 0;

    // 7) invalidation coinciding with START waits one cycle
    do_op(TM_START); inv_hit = 1; inv_src = 4'd3;
    expect_ev("start wins", EV_START);
    step();
    expect_ev("delayed invalidation", EV_INVALIDATION, 4'd3);
    step();
    expect_ev("nothing more", EV_NONE);

    // 8) a conflict seen at commit time turns the commit into an abort
    empty_writeset = 0;
    conflict = 1;
    do_op(TM_COMMIT); step();
    expect_ev("TM0 silent", EV_NONE);
    step();
    expect_ev("commit became abort", EV_ABORT, AB_INVALIDATION);
    check("no write back", !write_tx_data);
    step();
    conflict = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
