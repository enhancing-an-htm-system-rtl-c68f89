// tb_tmbox_mon_top: end-to-end test of the monitored 8-core system at its
// default parameters.
//
// Each core is driven by a small processor model that runs transactions on a
// shared pool of addresses, so transactions conflict: it starts a
// transaction, makes random transactional reads and writes for 100 to 300
// cycles, then commits (sometimes after reading only, sometimes aborting on
// purpose, sometimes writing more lines than the write set holds) and retries
// after an abort. The host side takes the event words from the link with
// random stalls and rebuilds, per core, the absolute time of every event by
// summing the delta timestamps, as the offline converter does.
//
// Checked: every word is an event message; each core's event sequence obeys
// the transaction state machine (IDLE -> START -> try lock -> locked -> IDLE,
// with invalidation and abort); the rebuilt time of every START equals the
// cycle in which the processor model issued it; the counts of START, commit
// and abort events equal what the processors saw; no event is lost. It also
// counts each mechanism (lock refusals, the three abort causes, read-only
// commits, events buffered in the log unit while the ring is busy, link FIFO
// back-pressure) and fails if one never happened.
//
// The host-side rebuild mirrors the published post-processing (summing the
// deltas, a per-core transaction state machine); the processor models and
// their workload are this testbench's own.
module tb_tmbox_mon_top;
  import tmmon_pkg::*;

  localparam int N     = 8;
  localparam int NTX   = 12;       // transactions each core completes
  localparam int POOL  = 160;       // shared addresses

  logic clk = 1'b0;
  logic rst;
  logic op_valid [N];
  tm_op_e op [N];
  logic ready [N], rd_valid [N], wr_valid [N];
  logic [ADDR_W-1:0] rd_addr [N], wr_addr [N];
  logic tx_active [N], tx_committed [N], tx_aborted [N];
  logic [5:0] log_used [N];
  logic log_dropped [N];
  logic out_valid, out_ready, ev_dropped, lock_held;
  logic [MSG_W-1:0] out_data;
  logic [CPU_W-1:0] lock_owner;
  logic [6:0] fifo_count;

  tmbox_mon_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc;

  // processor-side bookkeeping
  int  p_starts [N], p_commits [N], p_aborts [N];
  longint unsigned start_q [N][$];
  bit  done [N];

  // host-side reconstruction
  longint unsigned t_abs [N];
  int  h_state [N];                 // 0 idle, 1 active, 2 try-lock, 3 locked
  bit  h_inv [N];                   // an INVALIDATION was logged in this transaction
  int  h_count [16];                // events per type
  int  h_cause [3];
  int  h_starts [N], h_commits [N], h_aborts [N];
  int  peak_log = 0, peak_fifo = 0, link_stalls = 0, drops = 0, n_words = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (rst) cyc <= 0; else cyc <= cyc + 1;
  end

  // monitoring of the status outputs
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < N; c++) begin
      if (int'(log_used[c]) > peak_log) peak_log = int'(log_used[c]);
      if (log_dropped[c]) drops++;
      if (tx_committed[c]) p_commits[c]++;
      if (tx_aborted[c])   p_aborts[c]++;
    end
    if (int'(fifo_count) > peak_fifo) peak_fifo = int'(fifo_count);
    if (ev_dropped) drops++;
    if (out_valid && !out_ready) link_stalls++;
  end

  // host: random stalls on the link
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  // host: rebuild the per-core event streams
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    logic [1:0] mt; logic [3:0] cpu, et, ed; logic [19:0] ts; int ci;
    {mt, cpu, et, ts, ed} = out_data;
    ci = int'(cpu);
    n_words++;
    checks++;
    if (mt != 2'd3 || int'(cpu) >= N) begin
      failures++; $display("FAIL bad word %h", out_data);
    end else begin
      t_abs[ci] += 64'(ts);
      h_count[et]++;
      case (ev_type_e'(et))
        EV_START: begin
          if (h_state[ci] != 0) begin failures++; $display("FAIL cpu%0d START in state %0d", cpu, h_state[ci]); end
          if (start_q[ci].size() == 0 || start_q[ci][0] != t_abs[ci]) begin
            failures++; $display("FAIL cpu%0d START time %0d", cpu, t_abs[ci]);
          end
          if (start_q[ci].size() > 0) void'(start_q[ci].pop_front());
          h_starts[ci]++;
          h_state[ci] = 1; h_inv[ci] = 0;
        end
        EV_READONLY: begin
          if (h_state[ci] != 1 || h_inv[ci]) begin failures++; $display("FAIL cpu%0d READONLY in %0d", cpu, h_state[ci]); end
          h_commits[ci]++; h_state[ci] = 0;
        end
        EV_BEFORE_LOCK: begin
          if (h_state[ci] != 1 || h_inv[ci]) begin failures++; $display("FAIL cpu%0d BEFORE_LOCK in %0d", cpu, h_state[ci]); end
          h_state[ci] = 2;
        end
        EV_RETRY_LOCK: begin
          if (h_state[ci] != 2) begin failures++; $display("FAIL cpu%0d RETRY in %0d", cpu, h_state[ci]); end
          h_state[ci] = 1;
        end
        EV_AFTER_LOCK: begin
          if (h_state[ci] != 2) begin failures++; $display("FAIL cpu%0d AFTER_LOCK in %0d", cpu, h_state[ci]); end
          h_state[ci] = 3;
        end
        EV_COMMIT: begin
          if (h_state[ci] != 3 || h_inv[ci]) begin failures++; $display("FAIL cpu%0d COMMIT in %0d", cpu, h_state[ci]); end
          h_commits[ci]++; h_state[ci] = 0;
        end
        EV_INVALIDATION: begin
          if (!(h_state[ci] inside {1, 2, 3}) || h_inv[ci]) begin failures++; $display("FAIL cpu%0d INV in %0d", cpu, h_state[ci]); end
          if (int'(ed) >= N || ed == cpu) begin failures++; $display("FAIL cpu%0d INV from %0d", cpu, ed); end
          h_inv[ci] = 1;
        end
        EV_ABORT: begin
          if (!(h_state[ci] inside {1, 2, 3})) begin failures++; $display("FAIL cpu%0d ABORT in %0d", cpu, h_state[ci]); end
          // an invalidation abort must have logged its INVALIDATION; a
          // transaction already aborting for another reason may log one too
          if (ed == 4'(AB_INVALIDATION) && !h_inv[ci]) begin
            failures++; $display("FAIL cpu%0d invalidation abort without INVALIDATION", cpu);
          end
          if (int'(ed) < 3) h_cause[int'(ed)]++;
          h_aborts[ci]++; h_state[ci] = 0;
        end
        default: begin failures++; $display("FAIL unknown event %0d", et); end
      endcase
    end
  end

  // processor models
  for (genvar g = 0; g < N; g++) begin : g_cpu
    task automatic tick();
      @(posedge clk); #1;
      op_valid[g] = 0; rd_valid[g] = 0; wr_valid[g] = 0;
    endtask

    initial begin
      int len, kind, ab0, cm0, nw;
      op_valid[g] = 0; op[g] = TM_NONE; rd_valid[g] = 0; wr_valid[g] = 0;
      rd_addr[g] = 0; wr_addr[g] = 0;
      p_starts[g] = 0; p_commits[g] = 0; p_aborts[g] = 0; t_abs[g] = 0; h_state[g] = 0; h_inv[g] = 0;
      h_starts[g] = 0; h_commits[g] = 0; h_aborts[g] = 0;
      @(negedge rst);
      #1;
      repeat ($urandom_range(0, 200)) tick();
      for (int t = 0; t < NTX; t++) begin
        kind = $urandom_range(0, 19);      // 0,3: read-only, 1,4: software abort, 2: capacity, else normal
        if (kind == 3) kind = 0;
        if (kind == 4) kind = 1;
        forever begin
          while (!ready[g]) tick();
          ab0 = p_aborts[g]; cm0 = p_commits[g];
          op_valid[g] = 1; op[g] = TM_START;
          start_q[g].push_back(cyc);
          p_starts[g]++;
          tick();
          len = $urandom_range(100, 300);
          nw = 0;
          for (int k = 0; k < len && tx_active[g]; k++) begin
            if ($urandom_range(0, 15) == 0) begin
              rd_valid[g] = 1; rd_addr[g] = 28'($urandom_range(0, POOL - 1) * 4);
            end
            if (kind != 0 && ((kind == 2) ? (k % 4 == 0) : ($urandom_range(0, 40) == 0 || (k == 10 && nw == 0)))) begin
              wr_valid[g] = 1; wr_addr[g] = 28'(((kind == 2) ? 1000 + k : $urandom_range(0, POOL - 1)) * 4);
              nw++;
            end
            tick();
          end
          while (!ready[g]) tick();
          if (tx_active[g]) begin
            op_valid[g] = 1; op[g] = (kind == 1) ? TM_ABORT : TM_COMMIT;
            tick();
          end
          while (p_aborts[g] == ab0 && p_commits[g] == cm0) tick();
          if (p_commits[g] != cm0) break;
          if (kind == 1 || kind == 2) break;   // planned aborts are not retried
          repeat ($urandom_range(5, 40)) tick();
        end
        repeat ($urandom_range(10, 60)) tick();
      end
      done[g] = 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    rst = 1;
    foreach (done[i]) done[i] = 0;
    foreach (h_count[i]) h_count[i] = 0;
    foreach (h_cause[i]) h_cause[i] = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    do begin
      @(posedge clk);
      all_done = 1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    // let every log and the link FIFO drain
    repeat (2000) @(posedge clk);
    #1;

    check("no event lost", drops == 0);
    check("link drained", fifo_count == 0 && !out_valid);
    for (int c = 0; c < N; c++) begin
      check($sformatf("cpu%0d log empty", c), log_used[c] == 0);
      check($sformatf("cpu%0d starts", c), h_starts[c] == p_starts[c]);
      check($sformatf("cpu%0d commits", c), h_commits[c] == p_commits[c] && p_commits[c] >= 1);
      check($sformatf("cpu%0d aborts", c), h_aborts[c] == p_aborts[c]);
      check($sformatf("cpu%0d all START times matched", c), start_q[c].size() == 0);
      check($sformatf("cpu%0d back to idle", c), h_state[c] == 0);
    end

    $display("events: start=%0d commit=%0d readonly=%0d abort=%0d invalidation=%0d before_lock=%0d after_lock=%0d retry_lock=%0d",
             h_count[EV_START], h_count[EV_COMMIT], h_count[EV_READONLY], h_count[EV_ABORT],
             h_count[EV_INVALIDATION], h_count[EV_BEFORE_LOCK], h_count[EV_AFTER_LOCK], h_count[EV_RETRY_LOCK]);
    $display("abort causes: software=%0d capacity=%0d invalidation=%0d", h_cause[0], h_cause[1], h_cause[2]);
    $display("peak log entries=%0d peak link fifo=%0d link stall cycles=%0d words=%0d cycles=%0d",
             peak_log, peak_fifo, link_stalls, n_words, cyc);

    check("mechanism START", h_count[EV_START] > 0);
    check("mechanism COMMIT", h_count[EV_COMMIT] > 0);
    check("mechanism READONLY commit", h_count[EV_READONLY] > 0);
    check("mechanism BEFORE_LOCK", h_count[EV_BEFORE_LOCK] > 0);
    check("mechanism AFTER_LOCK", h_count[EV_AFTER_LOCK] > 0);
    check("mechanism RETRY_LOCK (lock refused)", h_count[EV_RETRY_LOCK] > 0);
    check("mechanism INVALIDATION", h_count[EV_INVALIDATION] > 0);
    check("mechanism software abort", h_cause[0] > 0);
    check("mechanism capacity abort", h_cause[1] > 0);
    check("mechanism invalidation abort", h_cause[2] > 0);
    check("mechanism events buffered in log unit", peak_log > 1);
    check("mechanism link FIFO back-pressure", peak_fifo > 1 && link_stalls > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
