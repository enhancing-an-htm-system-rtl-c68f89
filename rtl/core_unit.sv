// core_unit: the transactional-memory and monitoring hardware of one core.
//
// It joins the four per-core blocks the system diagram shows around the
// processor: the TM state machine with its event generation (event_gen), the
// TM unit holding the read and write sets (tm_unit), the log unit that
// timestamps and buffers events (log_fifo) and the bus node on the secondary
// ring (ring_node). The processor itself, its L1 cache and the memory ring
// stay outside; the processor side is reduced to the transactional requests
// (op), the addresses of transactional reads and writes, and status.
//
// Flow of a committing transaction: START opens the sets; reads and writes
// fill them; COMMIT with a non-empty write set sends a TRY lock message and
// waits for GRANT (a DENY makes the state machine retry); after the grant the
// write set is sent around the ring as invalidations, which abort
// conflicting transactions on other cores, and the lock is then released.
// Every state change is logged and travels to the bus controller in idle ring
// slots. How the lock messages and the write-back are sequenced here is this
// implementation's own choice.
//
// Interface: op is accepted while ready is high (one request per pulse of
// op_valid). rd_valid/wr_valid are sampled every clock while a transaction
// is open. ready stays low during the commit handshake and write-back.
module core_unit
  import tmmon_pkg::*;
#(
  parameter logic [CPU_W-1:0] CPU_ID    = '0,
  parameter int unsigned      LOG_DEPTH = 32,
  parameter int unsigned      RSET_SIZE = 16,
  parameter int unsigned      WSET_SIZE = 16
) (
  input  logic              clk,
  input  logic              rst,
  // processor side
  input  logic              op_valid,
  input  tm_op_e            op,
  output logic              ready,
  input  logic              rd_valid,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  output logic              tx_active,
  output logic              tx_committed,
  output logic              tx_aborted,
  // secondary ring
  input  ring_msg_t         ring_in,
  output ring_msg_t         ring_out,
  // monitoring status
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_used,
  output logic              log_dropped
);

  // TM unit <-> state machine
  logic empty_writeset, conflict, capacity, inv_hit;
  logic [CPU_W-1:0] inv_src;
  logic start_tx, invalidate_htm, write_tx_data, send_try_lock;
  logic draining, drain_valid, drain_ready, drain_done;
  logic [ADDR_W-1:0] drain_addr;
  logic lock_granted, lock_denied, fsm_ready;
  ev_type_e ev_type;
  logic [EDATA_W-1:0] ev_data;

  // ring receive
  logic inv_rx_valid;
  logic [ADDR_W-1:0] inv_rx_addr;
  logic [CPU_W-1:0]  inv_rx_src;

  // log unit
  logic log_empty, log_pop;
  logic [EVT_W-1:0]   log_ev;
  logic [EDATA_W-1:0] log_edata;
  logic [TS_W-1:0]    log_ts;

  // pending lock message
  logic       lock_pend, lock_tx_ready;
  lock_code_e lock_code;

  event_gen u_evgen (
    .clk, .rst,
    .op_valid (op_valid && ready),
    .op,
    .ready    (fsm_ready),
    .tx_active, .tx_committed, .tx_aborted,
    .empty_writeset, .conflict, .capacity, .inv_hit, .inv_src,
    .acquired_bus_lock        (lock_granted),
    .other_core_owns_bus_lock (lock_denied),
    .send_try_lock, .start_tx, .invalidate_htm, .write_tx_data,
    .ev_type, .ev_data
  );

  tm_unit #(.RSET_SIZE(RSET_SIZE), .WSET_SIZE(WSET_SIZE)) u_tm (
    .clk, .rst,
    .start_tx, .clear (invalidate_htm),
    .rd_valid, .rd_addr, .wr_valid, .wr_addr,
    .inv_valid (inv_rx_valid), .inv_addr (inv_rx_addr), .inv_src_in (inv_rx_src),
    .inv_hit, .inv_src, .conflict, .capacity, .empty_writeset,
    .active (),
    .drain_start (write_tx_data), .draining, .drain_valid, .drain_addr,
    .drain_ready, .drain_done
  );

  log_fifo #(.DEPTH(LOG_DEPTH)) u_log (
    .clk, .reset (rst),
    .output_enable   (log_pop),
    .event_in        (ev_type),
    .event_data_in   (ev_data),
    .empty           (log_empty),
    .full            (),
    .event_out       (log_ev),
    .event_data_out  (log_edata),
    .event_timestamp (log_ts),
    .used            (log_used),
    .dropped         (log_dropped)
  );

  ring_node #(.CPU_ID(CPU_ID)) u_node (
    .clk, .rst,
    .ring_in, .ring_out,
    .lock_tx_valid (lock_pend), .lock_tx_code (lock_code), .lock_tx_ready,
    .lock_granted, .lock_denied,
    .inv_tx_valid (drain_valid), .inv_tx_addr (drain_addr), .inv_tx_ready (drain_ready),
    .inv_rx_valid, .inv_rx_addr, .inv_rx_src,
    .ev_empty (log_empty),
    .ev_word  (pack_event(log_ev, log_ts, log_edata)),
    .ev_pop   (log_pop)
  );

  // TRY after BEFORE_LOCK; RELEASE once the write set has been sent, or at
  // once when a transaction that already holds the lock aborts.
  logic lock_owned;

  always_ff @(posedge clk) begin
    if (rst) begin
      lock_pend  <= 1'b0;
      lock_code  <= LK_TRY;
      lock_owned <= 1'b0;
    end else begin
      if (lock_granted) lock_owned <= 1'b1;
      if (send_try_lock) begin
        lock_pend <= 1'b1;
        lock_code <= LK_TRY;
      end else if (drain_done || (tx_aborted && lock_owned)) begin
        lock_pend  <= 1'b1;
        lock_code  <= LK_RELEASE;
        lock_owned <= 1'b0;
      end else if (lock_tx_ready) begin
        lock_pend <= 1'b0;
      end
    end
  end

  assign ready = fsm_ready && !draining && !lock_pend;

endmodule
