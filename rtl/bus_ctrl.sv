// bus_ctrl: the bus controller's part of the secondary ring. It gathers the
// monitoring events of all cores and sends them to the host over a channel
// of fixed bandwidth, and it arbitrates the ring-bus commit lock.
//
// Events (message type 3) are taken off the ring and written, as complete
// 34-bit messages (type, sender CPU, delta timestamp, event type, event data),
// into a FIFO_DEPTH-entry FIFO. The host channel sends at most one word every
// LINK_CYCLES clocks (out_valid/out_ready handshake), so the FIFO absorbs
// bursts that arrive faster than the link can carry them; an event that finds
// the FIFO full is lost and pulses ev_dropped. Gathering events, the FIFO and
// the fixed link bandwidth follow the published design. The FIFO depth, the
// link rate and the word-wide host interface are this implementation's own.
//
// Lock arbitration (this implementation's own protocol for the try-lock
// message the TM state machine sends): a TRY message is replaced in its slot
// by GRANT when the lock is free or already held by the sender, else by DENY;
// the reply travels on to the requester. A RELEASE from the owner frees the
// lock and its slot. Invalidations pass through unchanged.
// Latency: one clock from ring_in to ring_out.
module bus_ctrl
  import tmmon_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 64,
  parameter int unsigned LINK_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  ring_msg_t         ring_in,
  output ring_msg_t         ring_out,
  // host link
  output logic              out_valid,
  output logic [MSG_W-1:0]  out_data,
  input  logic              out_ready,
  output logic              ev_dropped,
  output logic              lock_held,
  output logic [CPU_W-1:0]  lock_owner,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);

  localparam int unsigned CNT_W = (LINK_CYCLES > 1) ? $clog2(LINK_CYCLES) : 1;

  logic        is_event, is_try, is_release;
  logic        fifo_empty, fifo_full, fifo_pop;
  ring_msg_t   out_n;
  logic [CNT_W-1:0] gap;

  assign is_event   = ring_in.valid && ring_in.mtype == MSG_EVENT;
  assign is_try     = ring_in.valid && ring_in.mtype == MSG_LOCK && ring_in.data[1:0] == LK_TRY;
  assign is_release = ring_in.valid && ring_in.mtype == MSG_LOCK && ring_in.data[1:0] == LK_RELEASE;

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_ev_fifo (
    .clk   (clk),
    .rst   (rst),
    .push  (is_event),
    .wdata ({ring_in.mtype, ring_in.cpu, ring_in.data}),
    .pop   (fifo_pop),
    .rdata (out_data),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  assign ev_dropped = is_event && fifo_full;
  assign out_valid  = !fifo_empty && (gap == '0);
  assign fifo_pop   = out_valid && out_ready;

  // fixed link bandwidth: after a word, wait LINK_CYCLES-1 clocks
  always_ff @(posedge clk) begin
    if (rst)                gap <= '0;
    else if (fifo_pop)      gap <= CNT_W'(LINK_CYCLES - 1);
    else if (gap != '0)     gap <= gap - 1'b1;
  end

  always_comb begin
    out_n = ring_in;
    if (is_event || is_release) out_n = RING_IDLE;
    else if (is_try) begin
      out_n.data = (!lock_held || lock_owner == ring_in.cpu) ? DATA_W'(LK_GRANT)
                                                             : DATA_W'(LK_DENY);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ring_out   <= RING_IDLE;
      lock_held  <= 1'b0;
      lock_owner <= '0;
    end else begin
      ring_out <= out_n;
      if (is_try && !lock_held) begin
        lock_held  <= 1'b1;
        lock_owner <= ring_in.cpu;
      end else if (is_release && lock_held && lock_owner == ring_in.cpu) begin
        lock_held <= 1'b0;
      end
    end
  end

  // The host channel's word stays put while it waits for out_ready.
  a_out_stable: assert property (@(posedge clk) disable iff (rst)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
