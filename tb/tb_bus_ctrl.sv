// tb_bus_ctrl: self-checking test of the bus controller's event and lock
// handling.
//
// Sends a back-to-back burst of event messages from several cores and checks
// that they leave the ring, reach the host link in order as complete 34-bit
// words, and leave at exactly one word per LINK_CYCLES clocks. Then fills the
// FIFO with the link stalled to see the drop of the first event that finds it
// full, checks that invalidations pass unchanged, and runs the commit lock:
// GRANT to a free lock, DENY to a second core, RELEASE only by the owner.
//
// The FIFO in front of a fixed-bandwidth link follows the published design;
// the lock messages and all sizes tested here are this implementation's own.
module tb_bus_ctrl;
  import tmmon_pkg::*;

  localparam int unsigned FIFO_DEPTH = 64, LINK_CYCLES = 4;

  logic clk = 1'b0;
  logic rst;
  ring_msg_t ring_in, ring_out;
  logic out_valid, out_ready, ev_dropped, lock_held;
  logic [MSG_W-1:0] out_data;
  logic [CPU_W-1:0] lock_owner;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  int checks = 0, failures = 0;
  logic [MSG_W-1:0] exp_q[$];
  int n_out = 0, last_out = -1, first_out = -1, bad_gap = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  bus_ctrl #(.FIFO_DEPTH(FIFO_DEPTH), .LINK_CYCLES(LINK_CYCLES)) dut (.*);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  function automatic ring_msg_t msg(msg_type_e t, logic [CPU_W-1:0] c, logic [DATA_W-1:0] d);
    return '{valid: 1'b1, mtype: t, cpu: c, data: d};
  endfunction

  // host side: compare every word taken, and the spacing of the words
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q[0]) begin
        failures++;
        $display("FAIL host word %h t=%0t", out_data, $time);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      if (last_out >= 0 && cyc - last_out < int'(LINK_CYCLES)) bad_gap++;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      n_out++;
    end
  end

  task automatic slot(ring_msg_t m, output ring_msg_t o);
    ring_in = m;
    @(posedge clk); #1;
    o = ring_out;
    ring_in = RING_IDLE;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ring_msg_t o, m;
    int t0, t1;
    rst = 1; ring_in = RING_IDLE; out_ready = 1;
    repeat (3) @(posedge clk); #1;
    rst = 0;

    // 1) burst of 12 events, link always ready
    for (int i = 0; i < 12; i++) begin
      m = msg(MSG_EVENT, 4'(i % 4), 28'h1398450 + 28'(i));
      exp_q.push_back({2'd3, 4'(i % 4), 28'h1398450 + 28'(i)});
      slot(m, o);
      check("event taken off the ring", !o.valid);
    end
    t0 = cyc;
    wait (exp_q.size() == 0);
    t1 = cyc;
    check("all 12 events delivered", n_out == 12);
    check("link spacing", bad_gap == 0);
    // first word left in the cycle after its capture, the other 11 at LINK_CYCLES spacing
    check("burst drain time", last_out - first_out == 11 * int'(LINK_CYCLES));
    $display("burst: 12 words, link busy until cycle %0d (t0=%0d t1=%0d)", last_out, t0, t1);
    repeat (LINK_CYCLES) @(posedge clk); #1;

    // 2) overflow with the link stalled
    out_ready = 0;
    for (int i = 0; i < FIFO_DEPTH; i++) begin
      exp_q.push_back({2'd3, 4'd7, 28'(i)});
      slot(msg(MSG_EVENT, 4'd7, 28'(i)), o);
    end
    check("fifo full", int'(fifo_count) == FIFO_DEPTH);
    ring_in = msg(MSG_EVENT, 4'd7, 28'hfff); #1;
    check("drop reported", ev_dropped);
    slot(msg(MSG_EVENT, 4'd7, 28'hfff), o);
    out_ready = 1;
    wait (exp_q.size() == 0);
    repeat (LINK_CYCLES + 1) @(posedge clk); #1;
    check("dropped event never sent", !out_valid && n_out == 12 + FIFO_DEPTH);

    // 3) invalidations pass unchanged
    slot(msg(MSG_INV, 4'd2, 28'h42), o);
    check("inv forwarded", o == msg(MSG_INV, 4'd2, 28'h42));

    // 4) lock arbitration
    slot(msg(MSG_LOCK, 4'd2, 28'(LK_TRY)), o);
    check("grant to 2", o == msg(MSG_LOCK, 4'd2, 28'(LK_GRANT)) && lock_held && lock_owner == 4'd2);
    slot(msg(MSG_LOCK, 4'd5, 28'(LK_TRY)), o);
    check("deny to 5", o == msg(MSG_LOCK, 4'd5, 28'(LK_DENY)) && lock_owner == 4'd2);
    slot(msg(MSG_LOCK, 4'd5, 28'(LK_RELEASE)), o);
    check("release by non-owner ignored", lock_held && lock_owner == 4'd2 && !o.valid);
    slot(msg(MSG_LOCK, 4'd2, 28'(LK_RELEASE)), o);
    check("release by owner", !lock_held && !o.valid);
    slot(msg(MSG_LOCK, 4'd5, 28'(LK_TRY)), o);
    check("grant to 5", o == msg(MSG_LOCK, 4'd5, 28'(LK_GRANT)) && lock_owner == 4'd5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
