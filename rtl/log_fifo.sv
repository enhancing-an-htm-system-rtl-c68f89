// log_fifo: the per-core log unit. It timestamps each event from the event
// generation unit and buffers it until the ring bus has an idle slot.
//
// A free-running cycle counter gives the time. When an event is stored, the
// unit saves the difference between now and the time of the previous stored
// event (delta encoding, TS_W = 20 bits, so gaps up to 2^20 - 1 cycles are
// exact; longer gaps wrap). Events are kept in a DEPTH-entry circular buffer
// (32 entries by default, the size the published experiments found
// sufficient). The port names clk, reset, output_enable, event_in, empty,
// full, event_out and event_timestamp follow the published block symbol.
// This design adds the 4-bit event data (event_data_in/event_data_out), the
// fill level (used, for peak-occupancy measurement) and a drop pulse.
//
// Timing: event_in != 0 (EV_NONE means "no event") stores the event at the
// clock edge; the oldest entry is shown on event_out/event_timestamp while
// empty is low (first-word fall-through) and output_enable removes it. An event
// that arrives while the buffer is full and not being read is lost and
// pulses dropped; the next stored delta is then measured from the last stored
// event, so reconstructed times stay correct.
module log_fifo
  import tmmon_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     output_enable,
  input  logic [EVT_W-1:0]         event_in,
  input  logic [EDATA_W-1:0]       event_data_in,
  output logic                     empty,
  output logic                     full,
  output logic [EVT_W-1:0]         event_out,
  output logic [EDATA_W-1:0]       event_data_out,
  output logic [TS_W-1:0]          event_timestamp,
  output logic [$clog2(DEPTH+1)-1:0] used,
  output logic                     dropped
);

  localparam int unsigned CNT_W = $clog2(DEPTH+1);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned ENT_W = EVT_W + TS_W + EDATA_W;

  logic [ENT_W-1:0]  mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [TS_W-1:0]   now, last;
  logic              push, pop;

  assign empty = (count == 0);
  assign full  = (count == CNT_W'(DEPTH));
  assign used  = count;
  assign pop   = output_enable && !empty;
  assign push  = (event_in != EV_NONE) && (!full || pop);
  assign dropped = (event_in != EV_NONE) && full && !pop;

  assign {event_out, event_timestamp, event_data_out} = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      now    <= '0;
      last   <= '0;
    end else begin
      now <= now + 1'b1;
      if (push) begin
        wr_ptr <= inc(wr_ptr);
        last   <= now;
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {event_in, now - last, event_data_in};
  end

  // the memory is read only where the buffer has been written
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

endmodule
