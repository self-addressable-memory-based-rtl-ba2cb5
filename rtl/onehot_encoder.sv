// onehot_encoder: turns the one-hot word lines of the memory decoder into a
// binary row address.  A memory that exposes its word lines is driven by the
// decoder directly; a memory macro with an address port (as the block RAMs of
// an FPGA) needs this encoder in between.  Each address bit is the OR of the
// word lines whose index has that bit set, so no priority logic is needed
// while at most one line is high.  `valid` says whether any line is high.
// Purely combinational.
//
// Origin: the published FPGA prototype used such an encoder because block
// memories give no word-line access; a custom array would not need it.
module onehot_encoder #(
  parameter int unsigned N   = sam_fsm_pkg::N_STATES_DEF,
  parameter int unsigned A_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   onehot,
  output logic [A_W-1:0] addr,
  output logic           valid
);

  always_comb begin
    addr = '0;
    for (int unsigned i = 0; i < N; i++)
      if (onehot[i]) addr = addr | A_W'(i);
  end

  assign valid = |onehot;

endmodule
