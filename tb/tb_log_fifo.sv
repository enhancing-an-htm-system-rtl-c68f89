// tb_log_fifo: self-checking test of the log unit.
//
// A reference queue in the testbench, with its own cycle counter, predicts
// every stored event and its delta timestamp. The test writes events with
// random gaps while reading at random, fills the 32-entry buffer to check
// full, the drop of an event arriving at a full buffer and the delta across a
// dropped event, checks that a gap longer than 2^20 cycles wraps the 20-bit
// delta, and counts the peak fill level.
//
// The 32-entry depth, the 20-bit delta encoding and the port names follow the
// published log unit; the drop rule at a full buffer is this implementation's
// own choice and is tested as such.
module tb_log_fifo;
  import tmmon_pkg::*;

  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0;
  logic reset;
  logic output_enable;
  logic [EVT_W-1:0] event_in;
  logic [EDATA_W-1:0] event_data_in;
  logic empty, full, dropped;
  logic [EVT_W-1:0] event_out;
  logic [EDATA_W-1:0] event_data_out;
  logic [TS_W-1:0] event_timestamp;
  logic [$clog2(DEPTH+1)-1:0] used;

  int checks = 0, failures = 0;
  longint unsigned cyc;           // equals the unit's clock count at the next edge
  longint unsigned last_t;
  logic [27:0] q[$];              // {type, delta, data}
  int peak = 0;

  always #5 clk = ~clk;

  log_fifo #(.DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) begin
    if (reset) cyc <= 0;
    else       cyc <= cyc + 1;
    if (!reset && int'(used) > peak) peak = int'(used);
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // One clock: optionally write an event and/or read the head.
  task automatic cycle(logic [3:0] ev, logic [3:0] d, logic rd);
    logic exp_push, exp_pop;
    logic [27:0] head;
    event_in = ev; event_data_in = d; output_enable = rd;
    #1;
    exp_pop  = rd && q.size() > 0;
    exp_push = ev != 0 && (q.size() < DEPTH || exp_pop);
    check("empty flag", empty == (q.size() == 0));
    check("full flag", full == (q.size() == DEPTH));
    check("used", int'(used) == q.size());
    check("dropped", dropped == (ev != 0 && !exp_push));
    if (exp_pop) begin
      head = q.pop_front();
      check("head", {event_out, event_timestamp, event_data_out} == head);
    end
    if (exp_push) begin
      q.push_back({ev, TS_W'(cyc - last_t), d});
      last_t = cyc;
    end
    @(posedge clk); #1;
    event_in = '0; output_enable = 1'b0;
  endtask

  initial begin
    repeat (1300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; output_enable = 0; event_in = 0; event_data_in = 0; last_t = 0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;
    check("empty after reset", empty && !full && used == 0);

    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] ev;
      ev = ($urandom_range(0, 2) == 0) ? 4'($urandom_range(1, 8)) : 4'd0;
      cycle(ev, 4'($urandom), $urandom_range(0, 3) == 0);
    end
    // drain
    while (q.size() > 0) cycle(0, 0, 1);

    // fill to full, one more is dropped
    for (int i = 0; i < DEPTH; i++) cycle(4'd1 + 4'(i % 8), 4'(i), 0);
    check("full after 32", full);
    cycle(4'd2, 4'd9, 0);                 // dropped
    cycle(4'd3, 4'd1, 1);                 // read and write in the same cycle
    repeat (5) cycle(0, 0, 0);
    while (q.size() > 0) cycle(0, 0, 1);
    cycle(4'd4, 4'd2, 0);                 // delta from the last stored event
    cycle(0, 0, 1);

    // a gap longer than the 20-bit range wraps
    repeat ((1 << 20) + 7) @(posedge clk);
    #1;
    cycle(4'd6, 4'd0, 0);
    check("wrapped delta is small", q.size() == 1 && q[0][23:4] < 20'd64);
    cycle(0, 0, 1);

    check("peak reached full", peak == DEPTH);
    $display("peak used entries: %0d", peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
