// memory_array: the state table of the SAM-FSM.  It has one row per FSM
// state (not one row per state and input character as a conventional
// table-driven FSM has), and a row holds that state's code followed by its
// match tag: {state_code, match_id}.
//
// Reading: there is no address decoder.  The memory decoder raises at most one
// word line and that row appears on `rdata` in the same cycle (asynchronous
// read); with no word line raised `rdata` is zero and `rhit` is low.  The word
// lines are turned into an index with onehot_encoder, which is how a memory
// with an address port is driven; a custom array would take the word lines
// straight onto its rows.  Row 0 is the root (start) state and is also
// available at all times on `root_data`.
//
// Writing: one row per clock through `we`/`waddr`/`wdata`, used to program
// or update the pattern set.  Rows are not reset.
//
// Origin: one row per state holding code and match tag, selected by word
// lines, follows the published design; the asynchronous read, the write port
// and the extra root-row port are choices of this design.
module memory_array #(
  parameter int unsigned N_ROWS = sam_fsm_pkg::N_STATES_DEF,
  parameter int unsigned DATA_W = sam_fsm_pkg::CODE_W_DEF
                                  + sam_fsm_pkg::match_w(sam_fsm_pkg::N_PATTERNS_DEF),
  parameter int unsigned A_W    = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic              clk,
  // programming port
  input  logic              we,
  input  logic [A_W-1:0]    waddr,
  input  logic [DATA_W-1:0] wdata,
  // word-line read port
  input  logic [N_ROWS-1:0] word_line,
  output logic [DATA_W-1:0] rdata,
  output logic              rhit,
  // root row
  output logic [DATA_W-1:0] root_data
);

  logic [DATA_W-1:0] rows [N_ROWS];
  logic [A_W-1:0]    raddr;

  onehot_encoder #(.N(N_ROWS), .A_W(A_W)) u_enc (
    .onehot (word_line),
    .addr   (raddr),
    .valid  (rhit)
  );

  always_ff @(posedge clk)
    if (we) rows[waddr] <= wdata;

  assign rdata     = rhit ? rows[raddr] : '0;
  assign root_data = rows[0];

endmodule
