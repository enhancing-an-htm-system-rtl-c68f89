// ring_node: a core unit's stop on the secondary (invalidation/event) ring.
//
// Every clock one message slot moves from ring_in through a register to
// ring_out. The node
//   - removes its own invalidations when they come back around the ring,
//   - removes bus-lock replies (GRANT/DENY) addressed to this core and reports
//     them on lock_granted / lock_denied,
//   - reports invalidations from other cores on inv_rx_* (they travel on),
//   - fills a free slot with, in order of priority, a bus-lock message, an
//     invalidation, or the oldest monitoring event from the log unit.
// Monitoring events therefore use only slots that no transactional traffic
// needs, so they never delay the application: this is the low-priority
// transport the monitoring design is built on. Removing messages at their
// sender or addressee, the priority between lock and invalidation messages,
// and the handshakes are this implementation's choices.
//
// Interface: lock_tx_valid/inv_tx_valid are held until the matching *_ready
// pulse (one cycle, in the cycle the message enters the ring). ev_pop pulses
// when the event shown by the log unit (ev_empty low) is taken. Latency: one
// clock per node.
module ring_node
  import tmmon_pkg::*;
#(
  parameter logic [CPU_W-1:0] CPU_ID = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  ring_msg_t         ring_in,
  output ring_msg_t         ring_out,
  // bus-lock requests from the TM state machine
  input  logic              lock_tx_valid,
  input  lock_code_e        lock_tx_code,
  output logic              lock_tx_ready,
  output logic              lock_granted,
  output logic              lock_denied,
  // invalidations to send (commit write-back)
  input  logic              inv_tx_valid,
  input  logic [ADDR_W-1:0] inv_tx_addr,
  output logic              inv_tx_ready,
  // invalidations received from other cores
  output logic              inv_rx_valid,
  output logic [ADDR_W-1:0] inv_rx_addr,
  output logic [CPU_W-1:0]  inv_rx_src,
  // monitoring events from the log unit
  input  logic              ev_empty,
  input  logic [DATA_W-1:0] ev_word,
  output logic              ev_pop
);

  logic own_inv, lock_reply, slot_free;
  ring_msg_t out_n;

  assign own_inv    = ring_in.valid && ring_in.mtype == MSG_INV  && ring_in.cpu == CPU_ID;
  assign lock_reply = ring_in.valid && ring_in.mtype == MSG_LOCK && ring_in.cpu == CPU_ID &&
                      (ring_in.data[1:0] == LK_GRANT || ring_in.data[1:0] == LK_DENY);
  assign slot_free  = !ring_in.valid || own_inv || lock_reply;

  assign lock_granted = lock_reply && ring_in.data[1:0] == LK_GRANT;
  assign lock_denied  = lock_reply && ring_in.data[1:0] == LK_DENY;

  assign inv_rx_valid = ring_in.valid && ring_in.mtype == MSG_INV && ring_in.cpu != CPU_ID;
  assign inv_rx_addr  = ring_in.data;
  assign inv_rx_src   = ring_in.cpu;

  always_comb begin
    out_n         = ring_in;
    lock_tx_ready = 1'b0;
    inv_tx_ready  = 1'b0;
    ev_pop        = 1'b0;
    if (slot_free) begin
      out_n = RING_IDLE;
      if (lock_tx_valid) begin
        out_n         = '{valid: 1'b1, mtype: MSG_LOCK, cpu: CPU_ID, data: DATA_W'(lock_tx_code)};
        lock_tx_ready = 1'b1;
      end else if (inv_tx_valid) begin
        out_n        = '{valid: 1'b1, mtype: MSG_INV, cpu: CPU_ID, data: inv_tx_addr};
        inv_tx_ready = 1'b1;
      end else if (!ev_empty) begin
        out_n  = '{valid: 1'b1, mtype: MSG_EVENT, cpu: CPU_ID, data: ev_word};
        ev_pop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ring_out <= RING_IDLE;
    else     ring_out <= out_n;
  end

  // An occupied slot always carries a message type.
  a_slot_typed: assert property (@(posedge clk) disable iff (rst)
                                 ring_out.valid |-> ring_out.mtype != MSG_NONE);

endmodule
