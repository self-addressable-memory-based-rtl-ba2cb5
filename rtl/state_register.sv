// state_register: holds the code of the current FSM state.  The code read
// from the memory array is loaded when the engine takes a step (`advance`).
//
// Packet starts: a packet is always scanned from the root state.  `eval_code`
// is the code the memory decoder should look at in this cycle: the root code
// (row 0 of the memory array) while a new packet is starting (`restart`) or
// before the first step after reset, and the stored code otherwise.  Keeping
// an "at root" flag rather than copying the root code at reset means the
// register needs no valid memory contents at reset.  One cycle from
// `next_code` to `eval_code`.
//
// Origin: the state register is part of the published architecture; the reset
// flag and the per-packet restart from the root are choices of this design.
module state_register #(
  parameter int unsigned CODE_W = sam_fsm_pkg::CODE_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              advance,
  input  logic              restart,
  input  logic [CODE_W-1:0] next_code,
  input  logic [CODE_W-1:0] root_code,
  output logic [CODE_W-1:0] eval_code,
  output logic [CODE_W-1:0] state_q
);

  logic at_root;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state_q <= '0;
      at_root <= 1'b1;
    end else if (advance) begin
      state_q <= next_code;
      at_root <= 1'b0;
    end

  assign eval_code = (at_root || restart) ? root_code : state_q;

endmodule
