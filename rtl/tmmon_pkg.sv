// tmmon_pkg: types and constants shared by the HTM monitoring hardware.
//
// The secondary ring bus carries 34-bit messages: a 6-bit header made of a
// 2-bit message type and the 4-bit sender CPU ID, followed by 28 data bits.
// Message type 3 marks a monitoring event. Inside an event the 28 data bits
// hold the 4-bit event type in [27:24], the 20-bit delta-encoded timestamp in
// [23:4] and 4 bits of event data in [3:0].
//
// Event codes 1..6 (start, commit, abort, invalidation, try-lock,
// lock-acquired) follow the published event list; READONLY and RETRY_LOCK,
// which the TM state machine also emits, get the free codes 7 and 8 here.
// Message types 1 (invalidation) and 2 (bus-lock traffic), the lock
// sub-codes, the abort-cause codes and the 28-bit transactional address width
// are this implementation's own choices. A separate valid bit marks an
// occupied ring slot.
package tmmon_pkg;

  localparam int unsigned CPU_W    = 4;   // CPU sender ID, up to 16 cores
  localparam int unsigned MTYPE_W  = 2;
  localparam int unsigned HDR_W    = MTYPE_W + CPU_W;   // 6
  localparam int unsigned DATA_W   = 28;
  localparam int unsigned MSG_W    = HDR_W + DATA_W;    // 34
  localparam int unsigned EVT_W    = 4;   // event type
  localparam int unsigned EDATA_W  = 4;   // event data
  localparam int unsigned TS_W     = 20;  // delta timestamp
  localparam int unsigned ADDR_W   = DATA_W;

  typedef enum logic [MTYPE_W-1:0] {
    MSG_NONE  = 2'd0,
    MSG_INV   = 2'd1,
    MSG_LOCK  = 2'd2,
    MSG_EVENT = 2'd3
  } msg_type_e;

  typedef enum logic [EVT_W-1:0] {
    EV_NONE        = 4'd0,
    EV_START       = 4'd1,
    EV_COMMIT      = 4'd2,
    EV_ABORT       = 4'd3,
    EV_INVALIDATION= 4'd4,
    EV_BEFORE_LOCK = 4'd5,
    EV_AFTER_LOCK  = 4'd6,
    EV_READONLY    = 4'd7,
    EV_RETRY_LOCK  = 4'd8
  } ev_type_e;

  // Cause of an abort, carried in the data field of an ABORT event.
  typedef enum logic [EDATA_W-1:0] {
    AB_SOFTWARE     = 4'd0,
    AB_CAPACITY     = 4'd1,
    AB_INVALIDATION = 4'd2
  } abort_cause_e;

  // Transactional operation requested by the processor core.
  typedef enum logic [1:0] {
    TM_NONE   = 2'd0,
    TM_START  = 2'd1,
    TM_COMMIT = 2'd2,
    TM_ABORT  = 2'd3
  } tm_op_e;

  // Sub-codes of bus-lock messages (low bits of the data field).
  typedef enum logic [1:0] {
    LK_TRY     = 2'd0,
    LK_GRANT   = 2'd1,
    LK_DENY    = 2'd2,
    LK_RELEASE = 2'd3
  } lock_code_e;

  typedef struct packed {
    logic               valid;
    msg_type_e          mtype;
    logic [CPU_W-1:0]   cpu;
    logic [DATA_W-1:0]  data;
  } ring_msg_t;

  localparam ring_msg_t RING_IDLE = '{valid: 1'b0, mtype: MSG_NONE, cpu: '0, data: '0};

  function automatic logic [DATA_W-1:0] pack_event(logic [EVT_W-1:0] etype,
                                                   logic [TS_W-1:0] ts,
                                                   logic [EDATA_W-1:0] edata);
    return {etype, ts, edata};
  endfunction

endpackage
