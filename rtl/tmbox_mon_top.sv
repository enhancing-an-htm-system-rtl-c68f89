// tmbox_mon_top: a multi-core hardware transactional memory system with
// event-based hardware monitoring on its secondary ring bus.
//
// N_CORES core units (8 by default, the system the design is shown with; the
// 4-bit CPU ID allows up to 16) and the bus controller form one ring:
// bus controller -> core 0 -> core 1 -> ... -> core N-1 -> bus controller.
// The ring carries invalidations, commit-lock messages and, in otherwise idle
// slots, monitoring events. The bus controller collects the events and sends
// them to the host link (out_*), one 34-bit word per event.
//
// The processors, their L1 caches, the memory ring and the DDR controller are
// not part of this module: each core's transactional requests and read/write
// addresses are ports (index = core number), as are the host link and the
// monitoring status.
//
// The ring order, the two endpoints of the ring, the per-core blocks and the
// default of 8 cores and 32 log entries follow the published system; the
// host-link port, the link FIFO depth and link speed, and the set sizes are
// this implementation's own choices.
module tmbox_mon_top
  import tmmon_pkg::*;
#(
  parameter int unsigned N_CORES     = 8,
  parameter int unsigned LOG_DEPTH   = 32,
  parameter int unsigned RSET_SIZE   = 16,
  parameter int unsigned WSET_SIZE   = 16,
  parameter int unsigned FIFO_DEPTH  = 64,
  parameter int unsigned LINK_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst,
  // processor side, one entry per core
  input  logic              op_valid     [N_CORES],
  input  tm_op_e            op           [N_CORES],
  output logic              ready        [N_CORES],
  input  logic              rd_valid     [N_CORES],
  input  logic [ADDR_W-1:0] rd_addr      [N_CORES],
  input  logic              wr_valid     [N_CORES],
  input  logic [ADDR_W-1:0] wr_addr      [N_CORES],
  output logic              tx_active    [N_CORES],
  output logic              tx_committed [N_CORES],
  output logic              tx_aborted   [N_CORES],
  // monitoring status
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_used [N_CORES],
  output logic              log_dropped  [N_CORES],
  // host link
  output logic              out_valid,
  output logic [MSG_W-1:0]  out_data,
  input  logic              out_ready,
  output logic              ev_dropped,
  output logic              lock_held,
  output logic [CPU_W-1:0]  lock_owner,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);

  ring_msg_t ring [N_CORES + 1];   // ring[i] feeds core i; ring[N_CORES] feeds the bus controller

  bus_ctrl #(.FIFO_DEPTH(FIFO_DEPTH), .LINK_CYCLES(LINK_CYCLES)) u_bc (
    .clk, .rst,
    .ring_in  (ring[N_CORES]),
    .ring_out (ring[0]),
    .out_valid, .out_data, .out_ready, .ev_dropped,
    .lock_held, .lock_owner, .fifo_count
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    core_unit #(
      .CPU_ID    (CPU_W'(i)),
      .LOG_DEPTH (LOG_DEPTH),
      .RSET_SIZE (RSET_SIZE),
      .WSET_SIZE (WSET_SIZE)
    ) u_core (
      .clk, .rst,
      .op_valid     (op_valid[i]),
      .op           (op[i]),
      .ready        (ready[i]),
      .rd_valid     (rd_valid[i]),
      .rd_addr      (rd_addr[i]),
      .wr_valid     (wr_valid[i]),
      .wr_addr      (wr_addr[i]),
      .tx_active    (tx_active[i]),
      .tx_committed (tx_committed[i]),
      .tx_aborted   (tx_aborted[i]),
      .ring_in      (ring[i]),
      .ring_out     (ring[i+1]),
      .log_used     (log_used[i]),
      .log_dropped  (log_dropped[i])
    );
  end

endmodule
