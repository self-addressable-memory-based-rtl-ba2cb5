// memory_decoder: the self-addressing part of the SAM-FSM.  It replaces the
// address decoder of the memory array and picks the row of the next state
// from the current state code and the packet characters.
//
// For every row k (every state S_k except the root) there is
//   * a group detector that fires when the current state code carries the
//     address tag of group G_k, the set of states that can move to S_k;
//   * a word-line AND gate that combines that detector with the decoded
//     character lines of the string labelling the transitions into S_k.
// For a plain state the string is one character.  For a super state (a chain
// of single-fan-out states collapsed into one) it is a super character of up
// to MAX_SC characters, and the gate takes one line from each of the input
// decoders of window positions 0..len-1.  When gates of different lengths
// fire together, the priority decoder keeps the longest; only the gates of
// that length drive their word lines, and the stride code P1P0 = length-1
// tells the look-ahead window how far to shift.  When no gate fires the
// machine returns to the root (row 0): `any_hit` is low, no word line is
// raised and the caller uses the root code.
//
// Programming: every row's detector mask, tag, super-character length
// (as a stride code) and characters are registers written through the cfg_*
// port, so both the group signatures and the character taps can be changed
// in the field.  Reset clears every mask, which disables every row; row 0 is
// the root and should be left unprogrammed.
//
// Timing: word lines are combinational from state_code/win/avail; the
// configuration registers load on the clock edge.  `avail` is how many window
// characters belong to the current packet and have arrived (1..MAX_SC); a
// gate never fires on characters that are not there.
//
// Origin: detectors, input decoders, AND gates, priority decoder and
// programmability follow the published design; per-row character registers in
// place of fixed wiring, the length compare that suppresses shorter gates,
// and the root fallback are choices of this design.
module memory_decoder
  import sam_fsm_pkg::*;
#(
  parameter int unsigned N_ROWS = N_STATES_DEF,
  parameter int unsigned CODE_W = CODE_W_DEF,
  parameter int unsigned MAX_SC = MAX_SC_DEF,
  parameter int unsigned A_W    = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // programming port
  input  logic                     cfg_we,
  input  logic [A_W-1:0]           cfg_row,
  input  logic [CODE_W-1:0]        cfg_mask,
  input  logic [CODE_W-1:0]        cfg_tag,
  input  stride_e                  cfg_len,
  input  logic [MAX_SC*CHAR_W-1:0] cfg_chars,   // character j in bits [8j+7:8j]
  // decoding
  input  logic [CODE_W-1:0]        state_code,
  input  logic [CHAR_W-1:0]        win [MAX_SC],
  input  logic [2:0]               avail,
  output logic [N_ROWS-1:0]        word_line,
  output logic                     any_hit,
  output stride_e                  stride
);

  logic [CODE_W-1:0]        det_mask  [N_ROWS];
  logic [CODE_W-1:0]        det_tag   [N_ROWS];
  stride_e                  det_len   [N_ROWS];
  logic [MAX_SC*CHAR_W-1:0] det_chars [N_ROWS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int unsigned k = 0; k < N_ROWS; k++) det_mask[k] <= '0;
    end else if (cfg_we) begin
      det_mask[cfg_row] <= cfg_mask;
    end

  always_ff @(posedge clk)
    if (cfg_we) begin
      det_tag[cfg_row]   <= cfg_tag;
      det_len[cfg_row]   <= cfg_len;
      det_chars[cfg_row] <= cfg_chars;
    end

  // one input decoder per window position
  logic [N_CHARS-1:0] dec [MAX_SC];
  for (genvar j = 0; j < MAX_SC; j++) begin : g_dec
    input_decoder u_dec (.ch(win[j]), .onehot(dec[j]));
  end

  // group detectors and word-line AND gates
  logic [N_ROWS-1:0] gd_hit;
  logic [N_ROWS-1:0] m;
  for (genvar k = 0; k < N_ROWS; k++) begin : g_row
    group_detector #(.CODE_W(CODE_W)) u_gd (
      .state_code (state_code),
      .mask       (det_mask[k]),
      .tag        (det_tag[k]),
      .hit        (gd_hit[k])
    );

    always_comb begin
      m[k] = gd_hit[k] && ({1'b0, det_len[k]} < avail)
             && (32'(det_len[k]) < MAX_SC);
      for (int unsigned j = 0; j < MAX_SC; j++)
        if (j <= 32'(det_len[k]))
          m[k] = m[k] && dec[j][det_chars[k][j*CHAR_W +: CHAR_W]];
    end
  end

  // per length: did any gate of that length fire
  logic [MAX_SC-1:0] m_any;
  always_comb begin
    m_any = '0;
    for (int unsigned k = 0; k < N_ROWS; k++)
      for (int unsigned j = 0; j < MAX_SC; j++)
        if (m[k] && 32'(det_len[k]) == j) m_any[j] = 1'b1;
  end

  priority_decoder #(.MAX_SC(MAX_SC)) u_prio (.m_any(m_any), .p(stride));

  always_comb
    for (int unsigned k = 0; k < N_ROWS; k++)
      word_line[k] = m[k] && (det_len[k] == stride);

  assign any_hit = |m_any;

endmodule
