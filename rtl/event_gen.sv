// event_gen: transactional part of the core's cache state machine, with the
// monitoring events it emits.
//
// The machine has the four states that matter for transactions: READY (the
// ordinary ready/ready-check state), TM0 (commit or abort requested), TM1
// (waiting for the ring-bus commit lock) and TM2 (finishing the transaction).
//   READY: a START request emits START and opens a transaction; a COMMIT or
//          ABORT request is latched and moves the machine to TM0.
//   TM0:   commit with an empty write set emits READONLY, clears the TM unit
//          and returns to READY; otherwise, while the lock is not held, it
//          emits BEFORE_LOCK, asks for the lock (send_try_lock) and goes to
//          TM1. An abort request goes to TM2.
//   TM1:   a grant emits AFTER_LOCK and goes to TM2; a refusal because another
//          core holds the lock emits RETRY_LOCK and goes back to TM0.
//   TM2:   an abort emits ABORT (data = cause) and clears the TM unit; a commit
//          emits COMMIT and starts the write-back (write_tx_data). Both return
//          to READY.
// These states, branches and events follow the published state machine.
// This design's own additions: the TM unit's conflict and capacity flags turn
// an open transaction into an abort (in READY, in TM0, and in TM2 even after
// the lock was granted), with the cause in the ABORT event's data; a matching
// invalidation emits an INVALIDATION event carrying the sender's CPU ID,
// delayed by one-deep buffering when it coincides with a state-machine event.
// TM0 and TM2 wait one cycle while such an event is pending or arriving, so
// that the log always shows the invalidation before the abort it causes and
// never after the end of the transaction.
//
// Interface: op/op_valid are accepted only while ready is high. ev_type/ev_data
// present at most one event per cycle (EV_NONE otherwise). All outputs are
// registered-state decodes; every state step takes one clock.
module event_gen
  import tmmon_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // processor core request
  input  logic                 op_valid,
  input  tm_op_e               op,
  output logic                 ready,
  output logic                 tx_active,
  output logic                 tx_committed,   // pulse
  output logic                 tx_aborted,     // pulse
  // TM unit status
  input  logic                 empty_writeset,
  input  logic                 conflict,
  input  logic                 capacity,
  input  logic                 inv_hit,        // pulse: first matching invalidation
  input  logic [CPU_W-1:0]     inv_src,
  // ring-bus lock
  input  logic                 acquired_bus_lock,
  input  logic                 other_core_owns_bus_lock,
  output logic                 send_try_lock,
  output logic                 start_tx,       // pulse: TM unit opens new sets
  output logic                 invalidate_htm, // pulse: TM unit is cleared
  output logic                 write_tx_data,  // pulse: write-back of the write set
  // event output to the log unit
  output ev_type_e             ev_type,
  output logic [EDATA_W-1:0]   ev_data
);

  typedef enum logic [1:0] {S_READY, S_TM0, S_TM1, S_TM2} state_e;

  state_e           state, state_n;
  tm_op_e           cur_op, cur_op_n;
  abort_cause_e     cause, cause_n;
  logic             active_n;
  ev_type_e         fsm_ev;
  logic [EDATA_W-1:0] fsm_data;

  // pending INVALIDATION event (when it coincides with an FSM event)
  logic             inv_pend;
  logic [CPU_W-1:0] inv_pend_src;
  logic             inv_seen;   // an invalidation event is waiting or arriving

  assign inv_seen = inv_pend || inv_hit;

  always_comb begin
    state_n        = state;
    cur_op_n       = cur_op;
    cause_n        = cause;
    active_n       = tx_active;
    fsm_ev         = EV_NONE;
    fsm_data       = '0;
    send_try_lock  = 1'b0;
    start_tx       = 1'b0;
    invalidate_htm = 1'b0;
    write_tx_data  = 1'b0;
    tx_committed   = 1'b0;
    tx_aborted     = 1'b0;
    unique case (state)
      S_READY: begin
        if (op_valid && op == TM_START && !tx_active) begin
          fsm_ev   = EV_START;
          start_tx = 1'b1;
          active_n = 1'b1;
        end else if (op_valid && tx_active && (op == TM_COMMIT || op == TM_ABORT)) begin
          cur_op_n = op;
          cause_n  = AB_SOFTWARE;
          state_n  = S_TM0;
        end else if (tx_active && (conflict || capacity)) begin
          cur_op_n = TM_ABORT;
          cause_n  = conflict ? AB_INVALIDATION : AB_CAPACITY;
          state_n  = S_TM0;
        end
      end
      S_TM0: begin
        if (cur_op == TM_COMMIT) begin
          if (conflict || capacity) begin
            cur_op_n = TM_ABORT;
            cause_n  = conflict ? AB_INVALIDATION : AB_CAPACITY;
            state_n  = S_TM2;
          end else if (inv_seen) begin
            // an invalidation is being logged: decide in the next cycle
          end else if (empty_writeset) begin
            fsm_ev         = EV_READONLY;
            invalidate_htm = 1'b1;
            tx_committed   = 1'b1;
            active_n       = 1'b0;
            state_n        = S_READY;
          end else if (!acquired_bus_lock) begin
            fsm_ev        = EV_BEFORE_LOCK;
            send_try_lock = 1'b1;
            state_n       = S_TM1;
          end
        end else begin
          state_n = S_TM2;
        end
      end
      S_TM1: begin
        if (acquired_bus_lock) begin
          fsm_ev  = EV_AFTER_LOCK;
          state_n = S_TM2;
        end else if (other_core_owns_bus_lock) begin
          fsm_ev  = EV_RETRY_LOCK;
          state_n = S_TM0;
        end
      end
      S_TM2: begin
        if (inv_seen) begin
          // an invalidation is being logged: finish one cycle later, as an abort
        end else if (cur_op == TM_ABORT || conflict || capacity) begin
          fsm_ev         = EV_ABORT;
          fsm_data       = EDATA_W'((cur_op == TM_ABORT) ? cause :
                                    conflict ? AB_INVALIDATION : AB_CAPACITY);
          invalidate_htm = 1'b1;
          tx_aborted     = 1'b1;
          active_n       = 1'b0;
          state_n        = S_READY;
        end else begin
          fsm_ev        = EV_COMMIT;
          write_tx_data = 1'b1;
          tx_committed  = 1'b1;
          active_n      = 1'b0;
          state_n       = S_READY;
        end
      end
      default: state_n = S_READY;
    endcase
  end

  assign ready = (state == S_READY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_READY;
      cur_op    <= TM_NONE;
      cause     <= AB_SOFTWARE;
      tx_active <= 1'b0;
    end else begin
      state     <= state_n;
      cur_op    <= cur_op_n;
      cause     <= cause_n;
      tx_active <= active_n;
    end
  end

  // Event output: state-machine events first, invalidation events fill gaps.
  always_comb begin
    ev_type = fsm_ev;
    ev_data = fsm_data;
    if (fsm_ev == EV_NONE) begin
      if (inv_pend) begin
        ev_type = EV_INVALIDATION;
        ev_data = EDATA_W'(inv_pend_src);
      end else if (inv_hit) begin
        ev_type = EV_INVALIDATION;
        ev_data = EDATA_W'(inv_src);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      inv_pend     <= 1'b0;
      inv_pend_src <= '0;
    end else if (fsm_ev == EV_NONE) begin
      // a pending event goes out now; a new hit this cycle waits if one was pending
      inv_pend     <= inv_pend && inv_hit;
      inv_pend_src <= inv_src;
    end else if (inv_hit) begin
      inv_pend     <= 1'b1;
      inv_pend_src <= inv_src;
    end
  end

endmodule
