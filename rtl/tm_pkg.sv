// tm_pkg: types and constants shared by the transactional-memory multiprocessor.
//
// The machine keeps one 8-byte word per cache line, so every address here is a
// word (= line) address and every datum is one 64-bit word. The package defines
// the processor-side operations (the ordinary LOAD/STORE plus the six
// transactional instructions), the bus cycles of the snoopy protocol, the four
// cache-line states and the four transactional tags of a transactional-cache
// entry. The names of operations, bus cycles, line states and tags follow the
// protocol tables of the design; the numeric encodings are this design's own.
package tm_pkg;

  // Word width: cache lines are 8 bytes, one 64-bit word.
  localparam int unsigned WORD_W = 64;

  typedef logic [WORD_W-1:0] word_t;

  // Processor-side operations.
  typedef enum logic [2:0] {
    OP_LOAD     = 3'd0,  // non-transactional read  (regular cache)
    OP_STORE    = 3'd1,  // non-transactional write (regular cache)
    OP_LT       = 3'd2,  // load transactional
    OP_LTX      = 3'd3,  // load transactional with intent to write
    OP_ST       = 3'd4,  // store transactional (tentative)
    OP_VALIDATE = 3'd5,  // is the current transaction still conflict-free?
    OP_COMMIT   = 3'd6,  // try to make tentative writes permanent
    OP_ABORT    = 3'd7   // discard tentative writes
  } tm_op_e;

  // Bus cycles. BUS_NONE marks an idle bus.
  typedef enum logic [2:0] {
    BUS_NONE  = 3'd0,
    BUS_READ  = 3'd1,  // regular read, new access shared
    BUS_RFO   = 3'd2,  // regular read for ownership, new access exclusive
    BUS_WRITE = 3'd3,  // write back of a replaced line
    BUS_TREAD = 3'd4,  // transactional read, new access shared
    BUS_TRFO  = 3'd5   // transactional read for ownership, new access exclusive
  } bus_cmd_e;

  // Cache-line states (Goodman's protocol).
  typedef enum logic [1:0] {
    LS_INVALID  = 2'd0,  // no access
    LS_VALID    = 2'd1,  // read, possibly shared, unmodified
    LS_DIRTY    = 2'd2,  // read/write, exclusive, modified
    LS_RESERVED = 2'd3   // read/write, exclusive, unmodified
  } line_state_e;

  // Transactional tags of a transactional-cache entry.
  typedef enum logic [1:0] {
    TT_EMPTY   = 2'd0,  // holds no data
    TT_NORMAL  = 2'd1,  // holds committed data
    TT_XCOMMIT = 2'd2,  // discarded on commit (holds the old value)
    TT_XABORT  = 2'd3   // discarded on abort (holds the new value)
  } tx_tag_e;

  // Which cache of a node issued a bus cycle.
  typedef enum logic {
    SRC_REG = 1'b0,
    SRC_TX  = 1'b1
  } bus_src_e;

  // One-cycle event pulses of a node, for counting how often each mechanism
  // of the protocol is exercised.
  typedef struct packed {
    logic hit;            // operation served by a cache without a bus cycle
    logic miss;           // fill cycle (READ/RFO/T_READ/T_RFO) issued
    logic writeback;      // a replaced DIRTY line was written back (WRITE)
    logic busy_refused;   // own transactional cycle answered BUSY -> abort
    logic conflict;       // snooped cycle hit the running transaction -> abort
    logic overflow;       // no replaceable entry in the transactional cache
    logic commit_ok;      // COMMIT returned true
    logic commit_fail;    // COMMIT returned false
    logic validate_fail;  // VALIDATE returned false
    logic orphan_op;      // transactional access executed by an orphan
    logic abort_instr;    // ABORT instruction
  } tm_events_t;

  function automatic logic is_exclusive(line_state_e s);
    return (s == LS_DIRTY) || (s == LS_RESERVED);
  endfunction

  function automatic logic is_tx_cmd(bus_cmd_e c);
    return (c == BUS_TREAD) || (c == BUS_TRFO);
  endfunction

endpackage
