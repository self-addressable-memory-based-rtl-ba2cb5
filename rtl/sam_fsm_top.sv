// sam_fsm_top: the two SAM-FSM string-matching engines side by side, each
// with its own programming port, input and results.
//
//   eng_* : sam_fsm_engine, one packet stream, look-ahead decoder that
//           consumes super characters of up to MAX_SC characters per clock.
//   pl_*  : sam_fsm_pipelined, four packet lanes interleaved through a
//           four-register state loop, one character per clock in total.
//
// Both are sized by the same parameters (defaults: 1718 states, 151-bit
// state codes, 500 patterns, super characters of up to 4 characters) and are
// programmed with the same kind of state table; the pipelined engine takes
// only one-character transitions.  See the two engines for timing.
//
// Origin: the published design presents the look-ahead and the pipelined
// engines as separate techniques, so they stand side by side here rather than
// merged.
module sam_fsm_top
  import sam_fsm_pkg::*;
#(
  parameter int unsigned N_ROWS     = N_STATES_DEF,
  parameter int unsigned CODE_W     = CODE_W_DEF,
  parameter int unsigned N_PATTERNS = N_PATTERNS_DEF,
  parameter int unsigned MAX_SC     = MAX_SC_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEF,
  parameter int unsigned MATCH_W    = match_w(N_PATTERNS),
  parameter int unsigned A_W        = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ---- look-ahead engine
  input  logic                     eng_cfg_we,
  input  logic [A_W-1:0]           eng_cfg_row,
  input  logic [CODE_W-1:0]        eng_cfg_mask,
  input  logic [CODE_W-1:0]        eng_cfg_tag,
  input  stride_e                  eng_cfg_len,
  input  logic [MAX_SC*CHAR_W-1:0] eng_cfg_chars,
  input  logic                     eng_mem_we,
  input  logic [A_W-1:0]           eng_mem_row,
  input  logic [CODE_W-1:0]        eng_mem_code,
  input  logic [MATCH_W-1:0]       eng_mem_match,
  input  logic                     eng_in_valid,
  output logic                     eng_in_ready,
  input  logic [MAX_SC*CHAR_W-1:0] eng_in_chars,
  input  logic [2:0]               eng_in_cnt,
  input  logic                     eng_in_sop,
  input  logic                     eng_in_eop,
  output logic                     eng_step_valid,
  output logic [2:0]               eng_step_len,
  output logic                     eng_match_valid,
  output logic [MATCH_W-1:0]       eng_match_id,
  output logic [15:0]              eng_match_end,
  output logic [CODE_W-1:0]        eng_state_code,
  // ---- four-lane pipelined engine
  input  logic                     pl_cfg_we,
  input  logic [A_W-1:0]           pl_cfg_row,
  input  logic [CODE_W-1:0]        pl_cfg_mask,
  input  logic [CODE_W-1:0]        pl_cfg_tag,
  input  logic [CHAR_W-1:0]        pl_cfg_char,
  input  logic                     pl_mem_we,
  input  logic [A_W-1:0]           pl_mem_row,
  input  logic [CODE_W-1:0]        pl_mem_code,
  input  logic [MATCH_W-1:0]       pl_mem_match,
  input  logic [N_LANES-1:0]       pl_lane_valid,
  output logic [N_LANES-1:0]       pl_lane_ready,
  input  logic [CHAR_W-1:0]        pl_lane_ch [N_LANES],
  input  logic [N_LANES-1:0]       pl_lane_sop,
  output logic                     pl_match_valid,
  output logic [1:0]               pl_match_lane,
  output logic [MATCH_W-1:0]       pl_match_id
);

  sam_fsm_engine #(
    .N_ROWS(N_ROWS), .CODE_W(CODE_W), .N_PATTERNS(N_PATTERNS), .MAX_SC(MAX_SC),
    .FIFO_DEPTH(FIFO_DEPTH), .MATCH_W(MATCH_W), .A_W(A_W)
  ) u_engine (
    .clk, .rst_n,
    .cfg_we    (eng_cfg_we),    .cfg_row  (eng_cfg_row),  .cfg_mask (eng_cfg_mask),
    .cfg_tag   (eng_cfg_tag),   .cfg_len  (eng_cfg_len),  .cfg_chars(eng_cfg_chars),
    .mem_we    (eng_mem_we),    .mem_row  (eng_mem_row),  .mem_code (eng_mem_code),
    .mem_match (eng_mem_match),
    .in_valid  (eng_in_valid),  .in_ready (eng_in_ready), .in_chars (eng_in_chars),
    .in_cnt    (eng_in_cnt),    .in_sop   (eng_in_sop),   .in_eop   (eng_in_eop),
    .step_valid(eng_step_valid), .step_len(eng_step_len),
    .match_valid(eng_match_valid), .match_id(eng_match_id), .match_end(eng_match_end),
    .state_code(eng_state_code)
  );

  sam_fsm_pipelined #(
    .N_ROWS(N_ROWS), .CODE_W(CODE_W), .N_PATTERNS(N_PATTERNS), .MATCH_W(MATCH_W), .A_W(A_W)
  ) u_pipelined (
    .clk, .rst_n,
    .cfg_we    (pl_cfg_we),   .cfg_row (pl_cfg_row),  .cfg_mask(pl_cfg_mask),
    .cfg_tag   (pl_cfg_tag),  .cfg_char(pl_cfg_char),
    .mem_we    (pl_mem_we),   .mem_row (pl_mem_row),  .mem_code(pl_mem_code),
    .mem_match (pl_mem_match),
    .lane_valid(pl_lane_valid), .lane_ready(pl_lane_ready),
    .lane_ch   (pl_lane_ch),    .lane_sop  (pl_lane_sop),
    .match_valid(pl_match_valid), .match_lane(pl_match_lane), .match_id(pl_match_id)
  );

endmodule
