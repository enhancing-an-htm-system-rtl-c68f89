// tb_tm_unit: self-checking test of the read/write-set unit.
//
// Fills the read and write sets (duplicates take no new entry), overflows the
// write set to raise the capacity flag, sends invalidations that miss, hit
// the read set and hit the write set (inv_hit must pulse once per
// transaction and carry the sender ID), and walks the write set at commit
// with random back-pressure, comparing the offered addresses with the order
// they were written in.
//
// The published design only says that the TM unit holds the read and write
// sets of a fixed, build-time size; set size, matching rule and write-set
// walk are this implementation's own.
module tb_tm_unit;
  import tmmon_pkg::*;

  localparam int unsigned RS = 16, WS = 16;

  logic clk = 1'b0;
  logic rst, start_tx, clear, rd_valid, wr_valid, inv_valid;
  logic [ADDR_W-1:0] rd_addr, wr_addr, inv_addr;
  logic [CPU_W-1:0] inv_src_in, inv_src;
  logic inv_hit, conflict, capacity, empty_writeset, active;
  logic drain_start, draining, drain_valid, drain_ready, drain_done;
  logic [ADDR_W-1:0] drain_addr;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tm_unit #(.RSET_SIZE(RS), .WSET_SIZE(WS)) dut (.*);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic idle();
    start_tx = 0; clear = 0; rd_valid = 0; wr_valid = 0; inv_valid = 0;
    drain_start = 0; drain_ready = 0;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic inv(logic [ADDR_W-1:0] a, logic [CPU_W-1:0] s, logic exp);
    inv_valid = 1; inv_addr = a; inv_src_in = s;
    #1;
    check("inv_hit", inv_hit == exp);
    if (exp) check("inv_src", inv_src == s);
    tick();
  endtask

  logic [ADDR_W-1:0] wlist [WS];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc;
    rst = 1; idle(); rd_addr = 0; wr_addr = 0; inv_addr = 0; inv_src_in = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    check("idle after reset", !active && empty_writeset && !conflict && !capacity);

    // an invalidation outside a transaction does nothing
    inv(28'h100, 4'd1, 0);

    start_tx = 1; tick();
    check("active", active && empty_writeset);

    // read set: 3 distinct addresses, one duplicate
    foreach (wlist[i]) wlist[i] = 28'h4000 + 28'(i * 16);
    rd_valid = 1; rd_addr = 28'h100; tick();
    rd_valid = 1; rd_addr = 28'h200; tick();
    rd_valid = 1; rd_addr = 28'h100; tick();
    rd_valid = 1; rd_addr = 28'h300; tick();
    // write set: fill exactly
    for (int i = 0; i < WS; i++) begin
      wr_valid = 1; wr_addr = wlist[i]; tick();
      check("not empty", !empty_writeset);
    end
    wr_valid = 1; wr_addr = wlist[3]; tick();   // duplicate: fine
    check("no capacity on duplicate", !capacity);

    inv(28'h999, 4'd2, 0);                        // miss
    check("no conflict on miss", !conflict);
    inv(28'h200, 4'd6, 1);                        // read-set hit
    check("conflict set", conflict);
    inv(wlist[5], 4'd7, 0);                       // second hit not reported
    check("conflict sticky", conflict);

    wr_valid = 1; wr_addr = 28'h7777; tick();     // 17th distinct write
    check("capacity", capacity);

    // clear empties everything
    clear = 1; tick();
    check("cleared", !active && empty_writeset && !conflict && !capacity);

    // new transaction: write-set hit, then commit walk with back-pressure
    start_tx = 1; tick();
    for (int i = 0; i < 5; i++) begin
      wr_valid = 1; wr_addr = wlist[i]; tick();
    end
    inv(wlist[2], 4'd9, 1);
    clear = 1; tick();
    start_tx = 1; tick();
    for (int i = 0; i < 5; i++) begin
      wr_valid = 1; wr_addr = wlist[i]; tick();
    end
    drain_start = 1; tick();
    check("draining", draining && !active);
    n = 0; cyc = 0;
    while (!drain_done && cyc < 100) begin
      drain_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (drain_valid && drain_ready) begin
        check("drain order", n < 5 && drain_addr == wlist[n]);
        n++;
      end
      cyc++;
      @(posedge clk); #1;
      drain_ready = 0;
    end
    check("all 5 written back", n == 5);
    check("done pulse", drain_done);
    tick();
    check("sets empty after write-back", !draining && empty_writeset && !active);

    // a read-only transaction's write-back finishes at once
    start_tx = 1; tick();
    drain_start = 1; tick();
    check("empty write-back done at once", drain_done && !drain_valid);
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
