// tb_core_unit: self-checking test of one core unit (core 2) on a ring that
// the testbench plays itself.
//
// The testbench issues transactions as the processor would, answers the
// core's lock requests with GRANT or DENY, injects invalidations from other
// cores, and collects every message the core puts on the ring. It checks
//   - the sequence of monitoring events for a read-only commit, a commit that
//     is refused once and then granted, and an abort caused by a matching
//     invalidation (with the sender's ID and the abort cause as event data),
//   - that summing the delta timestamps gives back the exact cycles in which
//     the testbench issued each START,
//   - that the commit sends the write set as invalidations and then releases
//     the lock.
//
// The event sequence follows the published cache state machine; the lock
// messages and the release after write-back are this implementation's own.
module tb_core_unit;
  import tmmon_pkg::*;

  localparam logic [CPU_W-1:0] ME = 4'd2;

  logic clk = 1'b0;
  logic rst;
  logic op_valid, ready, rd_valid, wr_valid, tx_active, tx_committed, tx_aborted;
  tm_op_e op;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  ring_msg_t ring_in, ring_out;
  logic [$clog2(32+1)-1:0] log_used;
  logic log_dropped;

  int checks = 0, failures = 0;
  longint unsigned cyc;
  ring_msg_t seen[$];
  longint unsigned start_cycles[$];
  int n_commit = 0, n_abort = 0;

  always #5 clk = ~clk;

  core_unit #(.CPU_ID(ME)) dut (.*);

  always @(posedge clk) begin
    if (rst) cyc <= 0; else cyc <= cyc + 1;
    if (!rst && ring_out.valid) seen.push_back(ring_out);
    if (!rst && tx_committed) n_commit++;
    if (!rst && tx_aborted) n_abort++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
    op_valid = 0; rd_valid = 0; wr_valid = 0; ring_in = RING_IDLE;
  endtask

  task automatic issue(tm_op_e o);
    int guard = 0;
    while (!ready && guard < 200) begin tick(); guard++; end
    op_valid = 1; op = o;
    if (o == TM_START) start_cycles.push_back(cyc);
    tick();
  endtask

  // wait for a lock message of the given code from this core
  task automatic wait_lock(lock_code_e c);
    int guard = 0;
    while (guard < 200) begin
      if (seen.size() > 0 && seen[$].mtype == MSG_LOCK && seen[$].data[1:0] == c) break;
      tick(); guard++;
    end
    check("lock message seen", guard < 200);
  endtask

  task automatic reply(lock_code_e c);
    ring_in = '{valid: 1'b1, mtype: MSG_LOCK, cpu: ME, data: DATA_W'(c)};
    tick();
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_type_e   evs[$];
    logic [3:0] eds[$];
    ring_msg_t  invs[$], locks[$];
    longint unsigned t_abs;
    int si;
    ev_type_e exp_evs[$];

    rst = 1; op_valid = 0; op = TM_NONE; rd_valid = 0; wr_valid = 0;
    rd_addr = 0; wr_addr = 0; ring_in = RING_IDLE;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (7) tick();

    // A) read-only transaction
    issue(TM_START);
    rd_valid = 1; rd_addr = 28'h100; tick();
    issue(TM_COMMIT);
    repeat (3) tick();

    // B) writing transaction, lock refused once then granted
    repeat (4) tick();
    issue(TM_START);
    rd_valid = 1; rd_addr = 28'h200; wr_valid = 1; wr_addr = 28'h300; tick();
    wr_valid = 1; wr_addr = 28'h304; tick();
    issue(TM_COMMIT);
    wait_lock(LK_TRY);
    repeat (2) tick();
    reply(LK_DENY);
    repeat (2) tick();
    wait_lock(LK_TRY);
    reply(LK_GRANT);
    wait_lock(LK_RELEASE);
    repeat (3) tick();

    // C) transaction aborted by core 5's invalidation of an address it read
    issue(TM_START);
    rd_valid = 1; rd_addr = 28'h500; tick();
    repeat (3) tick();
    ring_in = '{valid: 1'b1, mtype: MSG_INV, cpu: 4'd5, data: 28'h500};
    tick();
    repeat (10) tick();
    check("aborted", n_abort == 1 && !tx_active);
    check("two commits", n_commit == 2);
    repeat (20) tick();   // let the log drain onto the ring

    // split what the core sent
    foreach (seen[i]) begin
      if (seen[i].cpu != ME) begin
        // the only foreign message is core 5's invalidation, passed on
        check("foreign message forwarded", seen[i].mtype == MSG_INV && seen[i].cpu == 4'd5 &&
                                           seen[i].data == 28'h500);
        continue;
      end
      case (seen[i].mtype)
        MSG_EVENT: begin evs.push_back(ev_type_e'(seen[i].data[27:24])); eds.push_back(seen[i].data[3:0]); end
        MSG_INV:   invs.push_back(seen[i]);
        MSG_LOCK:  locks.push_back(seen[i]);
        default:   check("unknown message", 1'b0);
      endcase
    end
    exp_evs = '{EV_START, EV_READONLY,
                EV_START, EV_BEFORE_LOCK, EV_RETRY_LOCK, EV_BEFORE_LOCK, EV_AFTER_LOCK, EV_COMMIT,
                EV_START, EV_INVALIDATION, EV_ABORT};
    check("event count", evs.size() == exp_evs.size());
    foreach (exp_evs[i]) if (i < evs.size()) check($sformatf("event %0d", i), evs[i] == exp_evs[i]);
    if (evs.size() == exp_evs.size()) begin
      check("invalidation names core 5", eds[9] == 4'd5);
      check("abort cause invalidation", eds[10] == 4'(AB_INVALIDATION));
    end
    check("write set sent", invs.size() == 2 && invs[0].data == 28'h300 && invs[1].data == 28'h304);
    check("lock traffic", locks.size() == 3 && locks[2].data[1:0] == LK_RELEASE);
    // the lock is released only after the whole write set is on the ring
    begin
      automatic int last_inv = -1, rel = -1;
      foreach (seen[i]) begin
        if (seen[i].cpu == ME && seen[i].mtype == MSG_INV) last_inv = i;
        if (seen[i].cpu == ME && seen[i].mtype == MSG_LOCK && seen[i].data[1:0] == LK_RELEASE) rel = i;
      end
      check("release after write-back", rel > last_inv && last_inv >= 0);
    end

    // delta timestamps rebuild the START cycles
    t_abs = 0; si = 0;
    foreach (seen[i]) if (seen[i].mtype == MSG_EVENT) begin
      t_abs += 64'(seen[i].data[23:4]);
      if (seen[i].data[27:24] == EV_START) begin
        check($sformatf("START %0d time", si), si < start_cycles.size() && t_abs == start_cycles[si]);
        si++;
      end
    end
    check("three starts", si == 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
