// sam_fsm_pipelined: a SAM-FSM that scans four packets at once by
// interleaving them through a four-register state loop.
//
// Scanning different packets is independent, so the state loop
//   state register -> decoder -> register A -> register B -> memory
//   sub-arrays -> output registers -> multiplexer -> state register
// can hold four registers if four packets take turns: in each clock the
// input multiplexer serves the lane whose state is in the state register, and
// that lane's state comes back exactly four clocks later, when its next
// character is due.  One lane advances one character every four clocks; the
// engine as a whole takes one character per clock at a clock rate set by the
// slowest single stage instead of the whole loop.
//
// The memory is split into four sub-arrays of SUB = ceil(N_ROWS/4) rows and
// the decoder into two halves: decoder 0 selects the rows of sub-arrays 0
// and 1, decoder 1 those of sub-arrays 2 and 3.  Each decoder half is a
// memory_decoder limited to one character (no super characters).  The
// decoded word lines pass two pipeline registers before the sub-arrays, the
// sub-array outputs are registered, and the row that was hit is multiplexed
// into the state register.  No hit sends the lane back to the root (row 0).
//
// Lanes: lane_ready[l] is high in the clock that serves lane l; a character
// is taken when lane_valid[l] is also high (lane_sop marks the first
// character of a packet, which is then scanned from the root).  A lane with
// no character keeps its state.  Latency: a character taken in clock t gives
// match_valid/match_lane/match_id in clock t+4.
//
// Programming: global row numbers as in sam_fsm_engine; the write is steered
// to the decoder half and the sub-array that hold the row.
//
// Origin: four interleaved packets, a four-to-one input multiplexer, two
// decoders, two registers before four memory sub-arrays and registered
// outputs follow the published pipelined system; the row split between
// decoders and sub-arrays and the lane handshake are choices of this design.
module sam_fsm_pipelined
  import sam_fsm_pkg::*;
#(
  parameter int unsigned N_ROWS     = N_STATES_DEF,
  parameter int unsigned CODE_W     = CODE_W_DEF,
  parameter int unsigned N_PATTERNS = N_PATTERNS_DEF,
  parameter int unsigned MATCH_W    = match_w(N_PATTERNS),
  parameter int unsigned A_W        = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // memory decoder programming
  input  logic                   cfg_we,
  input  logic [A_W-1:0]         cfg_row,
  input  logic [CODE_W-1:0]      cfg_mask,
  input  logic [CODE_W-1:0]      cfg_tag,
  input  logic [CHAR_W-1:0]      cfg_char,
  // memory array programming
  input  logic                   mem_we,
  input  logic [A_W-1:0]         mem_row,
  input  logic [CODE_W-1:0]      mem_code,
  input  logic [MATCH_W-1:0]     mem_match,
  // four packet lanes
  input  logic [N_LANES-1:0]     lane_valid,
  output logic [N_LANES-1:0]     lane_ready,
  input  logic [CHAR_W-1:0]      lane_ch  [N_LANES],
  input  logic [N_LANES-1:0]     lane_sop,
  // results
  output logic                   match_valid,
  output logic [1:0]             match_lane,
  output logic [MATCH_W-1:0]     match_id
);

  localparam int unsigned SUB    = (N_ROWS + 3) / 4;
  localparam int unsigned HALF   = 2 * SUB;
  localparam int unsigned SUB_AW = (SUB > 1) ? $clog2(SUB) : 1;
  localparam int unsigned HALF_AW= $clog2(HALF);
  localparam int unsigned ROW_W  = CODE_W + MATCH_W;

  // ------------------------------------------------------------ loop stages
  typedef struct packed {
    logic [1:0]        lane;
    logic              take;      // a character was consumed for this lane
    logic              at_root;   // lane has not left the root since reset
    logic [CODE_W-1:0] code;      // state before this character
  } ctl_t;

  ctl_t              s_q, a_q, b_q, o_q;
  logic [HALF-1:0]   a_wl [2];
  logic [HALF-1:0]   b_wl [2];
  logic [3:0]        o_hit;
  logic [ROW_W-1:0]  o_row [4];

  // ------------------------------------------------------- input multiplexer
  logic              take;
  logic [CHAR_W-1:0] pin;
  logic              sop;

  always_comb begin
    lane_ready          = '0;
    lane_ready[s_q.lane] = 1'b1;
  end
  assign take = lane_valid[s_q.lane];
  assign pin  = lane_ch[s_q.lane];
  assign sop  = lane_sop[s_q.lane];

  // ------------------------------------------------------------- decoders
  logic [ROW_W-1:0]  root_data;
  logic [CODE_W-1:0] root_code, eval_code;
  assign root_code = root_data[ROW_W-1 -: CODE_W];
  assign eval_code = (s_q.at_root || sop) ? root_code : s_q.code;

  logic [HALF-1:0]   wl [2];
  logic [CHAR_W-1:0] win [1];
  assign win[0] = pin;

  for (genvar d = 0; d < 2; d++) begin : g_dec
    logic              we_d;
    logic [HALF_AW-1:0] row_d;
    assign we_d  = cfg_we && ((32'(cfg_row) >= HALF) == (d == 1));
    assign row_d = HALF_AW'(32'(cfg_row) - d * HALF);

    memory_decoder #(.N_ROWS(HALF), .CODE_W(CODE_W), .MAX_SC(1), .A_W(HALF_AW)) u_mdec (
      .clk, .rst_n,
      .cfg_we     (we_d),
      .cfg_row    (row_d),
      .cfg_mask,
      .cfg_tag,
      .cfg_len    (STRIDE_1),
      .cfg_chars  (cfg_char),
      .state_code (eval_code),
      .win,
      .avail      (take ? 3'd1 : 3'd0),
      .word_line  (wl[d]),
      .any_hit    (),
      .stride     ()
    );
  end

  // ----------------------------------------------------------- sub-arrays
  logic [ROW_W-1:0] rdata [4];
  logic [3:0]       rhit;

  for (genvar i = 0; i < 4; i++) begin : g_sub
    logic              we_i;
    logic [SUB_AW-1:0] row_i;
    logic [ROW_W-1:0]  root_i;
    assign we_i  = mem_we && (32'(mem_row) >= i * SUB) && (32'(mem_row) < (i + 1) * SUB);
    assign row_i = SUB_AW'(32'(mem_row) - i * SUB);

    memory_array #(.N_ROWS(SUB), .DATA_W(ROW_W), .A_W(SUB_AW)) u_mem (
      .clk,
      .we        (we_i),
      .waddr     (row_i),
      .wdata     ({mem_code, mem_match}),
      .word_line (b_wl[i / 2][(i % 2) * SUB +: SUB]),
      .rdata     (rdata[i]),
      .rhit      (rhit[i]),
      .root_data (root_i)
    );
    if (i == 0) begin : g_root
      assign root_data = root_i;
    end
  end

  // ----------------------------------------------- output multiplexer
  logic [ROW_W-1:0] sel_row;
  always_comb begin
    sel_row = '0;
    for (int i = 0; i < 4; i++)
      if (o_hit[i]) sel_row = o_row[i];
  end

  ctl_t s_next;
  always_comb begin
    s_next = o_q;
    if (o_q.take) begin
      s_next.at_root = 1'b0;
      s_next.code    = (|o_hit) ? sel_row[ROW_W-1 -: CODE_W] : root_code;
    end
    s_next.take = 1'b0;
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s_q <= '{lane: 2'd0, take: 1'b0, at_root: 1'b1, code: '0};
      a_q <= '{lane: 2'd3, take: 1'b0, at_root: 1'b1, code: '0};
      b_q <= '{lane: 2'd2, take: 1'b0, at_root: 1'b1, code: '0};
      o_q <= '{lane: 2'd1, take: 1'b0, at_root: 1'b1, code: '0};
      a_wl[0] <= '0; a_wl[1] <= '0;
      b_wl[0] <= '0; b_wl[1] <= '0;
      o_hit   <= '0;
      match_valid <= 1'b0;
      match_lane  <= '0;
      match_id    <= '0;
    end else begin
      // state register stage: lane served now, with the packet-start fold
      a_q.lane    <= s_q.lane;
      a_q.take    <= take;
      a_q.at_root <= s_q.at_root && !(take && sop);
      a_q.code    <= eval_code;
      a_wl        <= wl;
      b_q         <= a_q;
      b_wl        <= a_wl;
      o_q         <= b_q;
      o_hit       <= rhit;
      s_q         <= s_next;
      match_valid <= o_q.take && (|o_hit) && (sel_row[MATCH_W-1:0] != '0);
      match_lane  <= o_q.lane;
      match_id    <= o_q.take && (|o_hit) ? sel_row[MATCH_W-1:0] : '0;
    end

  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++) o_row[i] <= rdata[i];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(o_hit))
    else $error("sam_fsm_pipelined: several sub-arrays hit");

endmodule
