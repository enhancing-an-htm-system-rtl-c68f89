// tm_unit: read set and write set of the transaction running on one core.
//
// Each set is a small fully associative table of addresses (RSET_SIZE and
// WSET_SIZE entries; sizes are synthesis parameters). A transactional read or
// write adds its address to the matching set unless it is already there. An
// access that needs a new entry in a full set raises the sticky capacity
// flag. An invalidation from another core whose address is in either set
// raises the sticky conflict flag and pulses inv_hit (with the sender's CPU
// ID) once per transaction. At commit, write-back walks the write set: each
// address is offered on drain_addr until drain_ready accepts it, and the sets
// are cleared after the last one. start_tx or clear empties both sets.
//
// What the sets hold and the capacity and conflict rules follow the usual
// behaviour of an HTM unit as the design describes it; the table sizes, the
// address width and the drain handshake are this implementation's own.
// Timing: set updates and flags take effect at the next clock edge; inv_hit
// is combinational from the invalidation input.
module tm_unit
  import tmmon_pkg::*;
#(
  parameter int unsigned RSET_SIZE = 16,
  parameter int unsigned WSET_SIZE = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_tx,
  input  logic              clear,
  input  logic              rd_valid,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              inv_valid,
  input  logic [ADDR_W-1:0] inv_addr,
  input  logic [CPU_W-1:0]  inv_src_in,
  output logic              inv_hit,
  output logic [CPU_W-1:0]  inv_src,
  output logic              conflict,
  output logic              capacity,
  output logic              empty_writeset,
  output logic              active,
  // write-back of the write set
  input  logic              drain_start,
  output logic              draining,
  output logic              drain_valid,
  output logic [ADDR_W-1:0] drain_addr,
  input  logic              drain_ready,
  output logic              drain_done
);

  localparam int unsigned RC_W = $clog2(RSET_SIZE + 1);
  localparam int unsigned WC_W = $clog2(WSET_SIZE + 1);

  logic [ADDR_W-1:0] rset [RSET_SIZE];
  logic [ADDR_W-1:0] wset [WSET_SIZE];
  logic [RC_W-1:0]   r_cnt;
  logic [WC_W-1:0]   w_cnt;
  logic [WC_W-1:0]   d_idx;

  logic r_has, w_has, inv_in_r, inv_in_w;

  always_comb begin
    r_has = 1'b0;
    w_has = 1'b0;
    inv_in_r = 1'b0;
    inv_in_w = 1'b0;
    for (int i = 0; i < RSET_SIZE; i++) begin
      if (RC_W'(i) < r_cnt && rset[i] == rd_addr)  r_has    = 1'b1;
      if (RC_W'(i) < r_cnt && rset[i] == inv_addr) inv_in_r = 1'b1;
    end
    for (int i = 0; i < WSET_SIZE; i++) begin
      if (WC_W'(i) < w_cnt && wset[i] == wr_addr)  w_has    = 1'b1;
      if (WC_W'(i) < w_cnt && wset[i] == inv_addr) inv_in_w = 1'b1;
    end
  end

  assign inv_hit        = active && inv_valid && !conflict && (inv_in_r || inv_in_w);
  assign inv_src        = inv_src_in;
  assign empty_writeset = (w_cnt == 0);
  assign drain_valid    = draining && (d_idx < w_cnt);
  assign drain_addr     = wset[d_idx[$clog2(WSET_SIZE)-1:0]];
  assign drain_done     = draining && (d_idx == w_cnt);

  always_ff @(posedge clk) begin
    if (rst) begin
      r_cnt    <= '0;
      w_cnt    <= '0;
      d_idx    <= '0;
      conflict <= 1'b0;
      capacity <= 1'b0;
      active   <= 1'b0;
      draining <= 1'b0;
    end else if (start_tx || clear || drain_done) begin
      r_cnt    <= '0;
      w_cnt    <= '0;
      d_idx    <= '0;
      conflict <= 1'b0;
      capacity <= 1'b0;
      active   <= start_tx;
      draining <= 1'b0;
    end else if (drain_start) begin
      active   <= 1'b0;
      draining <= 1'b1;
      d_idx    <= '0;
    end else if (draining) begin
      if (drain_valid && drain_ready) d_idx <= d_idx + 1'b1;
    end else if (active) begin
      if (inv_hit) conflict <= 1'b1;
      if (rd_valid && !r_has) begin
        if (r_cnt < RC_W'(RSET_SIZE)) begin
          rset[r_cnt[$clog2(RSET_SIZE)-1:0]] <= rd_addr;
          r_cnt <= r_cnt + 1'b1;
        end else capacity <= 1'b1;
      end
      if (wr_valid && !w_has) begin
        if (w_cnt < WC_W'(WSET_SIZE)) begin
          wset[w_cnt[$clog2(WSET_SIZE)-1:0]] <= wr_addr;
          w_cnt <= w_cnt + 1'b1;
        end else capacity <= 1'b1;
      end
    end
  end

  initial begin
    for (int i = 0; i < RSET_SIZE; i++) rset[i] = '0;
    for (int i = 0; i < WSET_SIZE; i++) wset[i] = '0;
  end

endmodule
