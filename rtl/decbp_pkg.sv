// decbp_pkg: sizes and helper functions shared by the DEC-BPn scheduler.
//
// The scheduler serves an N x M input-queued switch with one logical queue
// per input and per non-empty fanout set (MC-VOQ). A fanout set is an M-bit
// mask; bit k stands for output port M-1-k, so the most significant bit is
// port 0, as in the bitmask encoding the scheduler was specified with. The
// mask value doubles as the queue index; index 0 (empty set) is never a real
// queue and its length is taken as zero.
//
// Defaults follow the 4 x 4 hardware scheduler: 4 inputs, 4 outputs, 16-bit
// queue lengths and 3 BP iterations per decimation round. The message width
// (MSG_W) and the tie-break key width are this design's own choices.
package decbp_pkg;

  localparam int unsigned N_IN_DEF   = 4;   // inputs
  localparam int unsigned M_OUT_DEF  = 4;   // outputs
  localparam int unsigned LEN_W_DEF  = 16;  // queue length width
  localparam int unsigned N_ITER_DEF = 3;   // BP iterations per round
  localparam int unsigned KEY_W      = 8;   // random tie-break key width

  // Signed width that holds every weight, message and belief:
  // w and f lie in [0, 2^LEN_W - 1]; a belief m = w - sum(b) over at most M
  // outputs lies in [-M*(2^LEN_W - 1), 2^LEN_W - 1].
  function automatic int unsigned msg_width(int unsigned len_w, int unsigned m);
    return len_w + $clog2(m + 1) + 1;
  endfunction

  // 3^m: number of (sigma, tau) pairs with tau a subset of sigma.
  function automatic int unsigned pow3(int unsigned m);
    int unsigned r = 1;
    for (int unsigned k = 0; k < m; k++) r = r * 3;
    return r;
  endfunction

  // Scheduler controller states.
  typedef enum logic [2:0] {
    ST_IDLE,    // waiting for start
    ST_MP,      // max-pressure weights, 3^M cycles
    ST_FWD,     // forward messages: one fanout set per cycle, 2^M cycles
    ST_BWD,     // close forward messages, compute backward messages, 1 cycle
    ST_DEC,     // belief maximisation: one fanout set per cycle, 2^M cycles
    ST_COMMIT,  // fix one input's decision, 1 cycle
    ST_DONE     // result valid
  } state_t;

endpackage
