// input_decoder: decodes one 8-bit packet character into a 256-bit one-hot
// vector.  Each AND gate of the memory decoder taps the one line that belongs
// to the character labelling the transitions into its state, so only a word
// line whose character is present can fire.  Purely combinational.
//
// Origin: the 8-to-256 one-hot decoder is part of the published architecture.
module input_decoder
  import sam_fsm_pkg::*;
(
  input  logic [CHAR_W-1:0]  ch,
  output logic [N_CHARS-1:0] onehot
);

  always_comb begin
    onehot     = '0;
    onehot[ch] = 1'b1;
  end

endmodule
