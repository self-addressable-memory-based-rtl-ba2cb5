// priority_decoder: the stride selector of the look-ahead decoder.  Input
// bit j is the OR of all word-line AND gates that recognise a super character
// of j+1 characters (M2 = bit 1, M3 = bit 2, M4 = bit 3; bit 0 stands for the
// single-character gates).  The longest recognised super character wins and
// its length minus one is the stride code P1P0: 11 for four characters, 00
// when nothing longer than one character fired (base mode).
// Purely combinational.
//
// Origin: the priority decoder and its P1P0 stride code follow the published
// look-ahead decoder; that the longest super character wins is inferred from
// its example, not stated.
module priority_decoder
  import sam_fsm_pkg::*;
#(
  parameter int unsigned MAX_SC = MAX_SC_DEF
) (
  input  logic [MAX_SC-1:0] m_any,
  output stride_e           p
);

  initial assert (MAX_SC >= 1 && MAX_SC <= 4)
    else $error("priority_decoder: MAX_SC must be 1..4");

  always_comb begin
    p = STRIDE_1;
    for (int j = 1; j < MAX_SC; j++)
      if (m_any[j]) p = stride_e'(j);
  end

endmodule
