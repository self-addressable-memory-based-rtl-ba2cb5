// sam_fsm_engine: a single-stream SAM-FSM (self-addressable memory-based
// finite state machine) pattern matcher with the look-ahead decoder for super
// characters.
//
// Datapath, one FSM step per clock:
//   packet beats -> pkt_fifo -> lookahead_window (D7..D0)
//   state_register --state code--> memory_decoder <--D0..D3-- window
//   memory_decoder --word lines--> memory_array --next code--> state_register
// The memory holds one row per state: the state's code, whose clusters carry
// the address tags of every group the state belongs to, and a match tag.
// The group detectors in the memory decoder read the tags of the current
// code, the word-line gates add the characters, and the selected row is the
// next state.  When no word line fires, the next state is the root (row 0).
// The priority decoder picks the longest recognised super character and the
// window shifts by its length, so up to MAX_SC characters are consumed per
// clock; with MAX_SC = 1 this is the plain one-character-per-clock engine.
//
// Packets: every packet is scanned from the root state.  Characters arrive
// in beats of 1..MAX_SC characters with packet start/end flags; a super
// character never spans two packets.
//
// Outputs (registered, one clock after the step): `step_valid` with the
// number of characters consumed (`step_len`), and `match_valid` with the
// pattern id of the state entered and `match_end`, the byte offset within
// the packet of the last character consumed.  From a beat entering an empty
// engine to its first step: 3 clocks (FIFO, window, then the step).
//
// Programming: cfg_* writes one row of the memory decoder (mask, tag, length
// code, characters), mem_* writes one row of the memory array.  Both can be
// written while the engine runs; a row should not be rewritten while it is
// in use.
//
// Origin: the datapath follows the published single-engine architecture and
// its look-ahead extension; packet framing, the interfaces, output registers
// and the root fallback are choices of this design.
module sam_fsm_engine
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
  // memory decoder programming
  input  logic                     cfg_we,
  input  logic [A_W-1:0]           cfg_row,
  input  logic [CODE_W-1:0]        cfg_mask,
  input  logic [CODE_W-1:0]        cfg_tag,
  input  stride_e                  cfg_len,
  input  logic [MAX_SC*CHAR_W-1:0] cfg_chars,
  // memory array programming
  input  logic                     mem_we,
  input  logic [A_W-1:0]           mem_row,
  input  logic [CODE_W-1:0]        mem_code,
  input  logic [MATCH_W-1:0]       mem_match,
  // packet characters
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [MAX_SC*CHAR_W-1:0] in_chars,
  input  logic [2:0]               in_cnt,
  input  logic                     in_sop,
  input  logic                     in_eop,
  // results
  output logic                     step_valid,
  output logic [2:0]               step_len,
  output logic                     match_valid,
  output logic [MATCH_W-1:0]       match_id,
  output logic [15:0]              match_end,
  output logic [CODE_W-1:0]        state_code
);

  localparam int unsigned BEAT_W = MAX_SC*CHAR_W + 5;
  localparam int unsigned ROW_W  = CODE_W + MATCH_W;

  // ---------------------------------------------------------------- FIFO
  logic              f_valid, f_ready;
  logic [BEAT_W-1:0] f_data;

  pkt_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .in_data   ({in_sop, in_eop, in_cnt, in_chars}),
    .out_valid (f_valid),
    .out_ready (f_ready),
    .out_data  (f_data)
  );

  // ------------------------------------------------------- look-ahead window
  logic [CHAR_W-1:0] win [MAX_SC];
  logic              win_sop, win_ready;
  logic [2:0]        avail;
  stride_e           stride;
  logic              step;

  lookahead_window #(.MAX_SC(MAX_SC)) u_win (
    .clk, .rst_n,
    .in_valid (f_valid),
    .in_ready (f_ready),
    .in_chars (f_data[MAX_SC*CHAR_W-1:0]),
    .in_cnt   (f_data[MAX_SC*CHAR_W +: 3]),
    .in_eop   (f_data[MAX_SC*CHAR_W + 3]),
    .in_sop   (f_data[MAX_SC*CHAR_W + 4]),
    .win, .win_sop, .win_eop(), .avail,
    .ready    (win_ready),
    .consume  (step),
    .stride
  );

  assign step = win_ready;

  // ------------------------------------------------------------ state loop
  logic [CODE_W-1:0] eval_code, next_code, root_code;
  logic [ROW_W-1:0]  rdata, root_data;
  logic [N_ROWS-1:0] word_line;
  logic              any_hit, rhit;

  assign root_code = root_data[ROW_W-1 -: CODE_W];

  state_register #(.CODE_W(CODE_W)) u_state (
    .clk, .rst_n,
    .advance   (step),
    .restart   (win_sop),
    .next_code,
    .root_code,
    .eval_code,
    .state_q   (state_code)
  );

  memory_decoder #(.N_ROWS(N_ROWS), .CODE_W(CODE_W), .MAX_SC(MAX_SC), .A_W(A_W)) u_mdec (
    .clk, .rst_n,
    .cfg_we, .cfg_row, .cfg_mask, .cfg_tag, .cfg_len, .cfg_chars,
    .state_code (eval_code),
    .win, .avail,
    .word_line,
    .any_hit,
    .stride
  );

  memory_array #(.N_ROWS(N_ROWS), .DATA_W(ROW_W), .A_W(A_W)) u_mem (
    .clk,
    .we        (mem_we),
    .waddr     (mem_row),
    .wdata     ({mem_code, mem_match}),
    .word_line,
    .rdata,
    .rhit,
    .root_data
  );

  logic [ROW_W-1:0] next_row;
  assign next_row  = rhit ? rdata : root_data;
  assign next_code = next_row[ROW_W-1 -: CODE_W];

  // --------------------------------------------------------------- results
  logic [15:0] pkt_off;
  logic [15:0] off_next;
  assign off_next = (win_sop ? 16'd0 : pkt_off) + 16'(stride) + 16'd1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pkt_off     <= '0;
      step_valid  <= 1'b0;
      step_len    <= '0;
      match_valid <= 1'b0;
      match_id    <= '0;
      match_end   <= '0;
    end else begin
      step_valid  <= step;
      match_valid <= 1'b0;
      if (step) begin
        pkt_off     <= off_next;
        step_len    <= 3'(stride) + 3'd1;
        match_valid <= (next_row[MATCH_W-1:0] != '0);
        match_id    <= next_row[MATCH_W-1:0];
        match_end   <= off_next - 16'd1;
      end
    end

  // at most one word line may be raised
  a_onehot_wl: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(word_line))
    else $error("sam_fsm_engine: several word lines raised; the state table is not deterministic");

  // any_hit and rhit are the same condition seen from both sides
  a_hit_agree: assert property (@(posedge clk) disable iff (!rst_n) any_hit == rhit)
    else $error("sam_fsm_engine: decoder and memory disagree on the selected row");

endmodule
