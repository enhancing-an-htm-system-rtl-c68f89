// tb_ring_node: self-checking test of the secondary-ring bus node (core 3).
//
// Directed cases check that foreign messages pass with one clock of latency
// and foreign invalidations are reported; that the node's own returning
// invalidation and lock replies addressed to it are removed (and a GRANT or
// DENY reported); that a pending monitoring event waits while the ring is busy
// and goes out, as a type-3 message, in the first idle slot; and that a free
// slot goes to a lock message before an invalidation before an event.
//
// Sending events only in idle slots and the type-3 event message follow the
// published design; message removal and slot priority are this
// implementation's own rules.
module tb_ring_node;
  import tmmon_pkg::*;

  localparam logic [CPU_W-1:0] ME = 4'd3;

  logic clk = 1'b0;
  logic rst;
  ring_msg_t ring_in, ring_out;
  logic lock_tx_valid, lock_tx_ready, lock_granted, lock_denied;
  lock_code_e lock_tx_code;
  logic inv_tx_valid, inv_tx_ready, inv_rx_valid;
  logic [ADDR_W-1:0] inv_tx_addr, inv_rx_addr;
  logic [CPU_W-1:0] inv_rx_src;
  logic ev_empty, ev_pop;
  logic [DATA_W-1:0] ev_word;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ring_node #(.CPU_ID(ME)) dut (.*);

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

  // present m on ring_in for one clock; return what comes out after the edge
  task automatic slot(ring_msg_t m, output ring_msg_t o);
    ring_in = m;
    #1;
    @(posedge clk); #1;
    o = ring_out;
    ring_in = RING_IDLE;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ring_msg_t o, m;
    rst = 1; ring_in = RING_IDLE;
    lock_tx_valid = 0; lock_tx_code = LK_TRY; inv_tx_valid = 0; inv_tx_addr = '0;
    ev_empty = 1; ev_word = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;

    // 1) foreign invalidation passes and is reported
    m = msg(MSG_INV, 4'd1, 28'h0abcdef);
    ring_in = m; #1;
    check("foreign inv reported", inv_rx_valid && inv_rx_addr == 28'h0abcdef && inv_rx_src == 4'd1);
    slot(m, o);
    check("foreign inv forwarded", o == m);

    // 2) a pending event waits while the ring is busy
    ev_empty = 0; ev_word = pack_event(EV_START, 20'h39845, 4'd0);
    for (int i = 0; i < 4; i++) begin
      m = msg(MSG_INV, 4'd5, 28'(i));
      ring_in = m; #1;
      check("no event pop on busy ring", !ev_pop);
      slot(m, o);
      check("busy slot forwarded", o == m);
    end
    ring_in = RING_IDLE; #1;
    check("event pop on idle slot", ev_pop);
    slot(RING_IDLE, o);
    check("event message", o == msg(MSG_EVENT, ME, 28'h1398450));
    ev_empty = 1;

    // 3) own invalidation returning is removed
    slot(msg(MSG_INV, ME, 28'h55), o);
    check("own inv removed", !o.valid);
    ring_in = msg(MSG_INV, ME, 28'h55); #1;
    check("own inv not reported", !inv_rx_valid);
    ring_in = RING_IDLE;

    // 4) lock replies
    ring_in = msg(MSG_LOCK, ME, 28'(LK_GRANT)); #1;
    check("grant reported", lock_granted && !lock_denied);
    slot(msg(MSG_LOCK, ME, 28'(LK_GRANT)), o);
    check("grant removed", !o.valid);
    ring_in = msg(MSG_LOCK, ME, 28'(LK_DENY)); #1;
    check("deny reported", lock_denied && !lock_granted);
    slot(msg(MSG_LOCK, ME, 28'(LK_DENY)), o);
    ring_in = msg(MSG_LOCK, 4'd6, 28'(LK_GRANT)); #1;
    check("other's grant not reported", !lock_granted);
    slot(msg(MSG_LOCK, 4'd6, 28'(LK_GRANT)), o);
    check("other's grant forwarded", o == msg(MSG_LOCK, 4'd6, 28'(LK_GRANT)));

    // 5) priority on a free slot: lock, then invalidation, then event
    lock_tx_valid = 1; lock_tx_code = LK_TRY;
    inv_tx_valid = 1; inv_tx_addr = 28'h123;
    ev_empty = 0; ev_word = 28'h2000100;
    m = msg(MSG_INV, 4'd0, 28'h9);
    ring_in = m; #1;
    check("busy: nothing taken", !lock_tx_ready && !inv_tx_ready && !ev_pop);
    slot(m, o);
    ring_in = RING_IDLE; #1;
    check("lock first", lock_tx_ready && !inv_tx_ready && !ev_pop);
    slot(RING_IDLE, o);
    check("lock message", o == msg(MSG_LOCK, ME, 28'(LK_TRY)));
    lock_tx_valid = 0; #1;
    check("inv second", inv_tx_ready && !ev_pop);
    slot(RING_IDLE, o);
    check("inv message", o == msg(MSG_INV, ME, 28'h123));
    inv_tx_valid = 0;
    // the slot freed by a returning own invalidation is reused
    ring_in = msg(MSG_INV, ME, 28'h123); #1;
    check("event into freed slot", ev_pop);
    slot(msg(MSG_INV, ME, 28'h123), o);
    check("event message 2", o == msg(MSG_EVENT, ME, 28'h2000100));
    ev_empty = 1;
    slot(RING_IDLE, o);
    check("idle stays idle", !o.valid);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
