// sam_fsm_pkg: constants shared by the SAM-FSM string-matching engines.
//
// The default sizes are those of the largest rule set in the storage
// comparison of the design: 500 patterns compiled into 1718 states with a
// 151-bit state code.  A memory row holds the state code of one state plus a
// match tag of ceil(log2(patterns+1)) bits (0 = no pattern ends in this
// state; the +1 reserving the "no match" value is this design's choice).
// Look-ahead super characters are at most four characters long, as in the
// look-ahead decoder of the design, so a stride fits the two bits P1P0.
//
// Origin: the default sizes are those of the largest published rule set (500
// patterns, 1718 states, 151-bit codes); the FIFO depth and the extra
// match-tag value for 'no match' are choices of this design.
package sam_fsm_pkg;

  localparam int unsigned CHAR_W         = 8;
  localparam int unsigned N_CHARS        = 256;

  localparam int unsigned N_STATES_DEF   = 1718;
  localparam int unsigned CODE_W_DEF     = 151;
  localparam int unsigned N_PATTERNS_DEF = 500;
  localparam int unsigned MAX_SC_DEF     = 4;
  localparam int unsigned FIFO_DEPTH_DEF = 16;
  localparam int unsigned N_LANES        = 4;

  // Stride code P1P0 of the priority decoder: number of characters consumed
  // in one clock minus one.
  typedef enum logic [1:0] {
    STRIDE_1 = 2'b00,
    STRIDE_2 = 2'b01,
    STRIDE_3 = 2'b10,
    STRIDE_4 = 2'b11
  } stride_e;

  function automatic int unsigned match_w(int unsigned n_patterns);
    return $clog2(n_patterns + 1);
  endfunction

endpackage
