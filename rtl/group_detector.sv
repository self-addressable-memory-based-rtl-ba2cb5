// group_detector: recognises one address tag (group signature) inside the
// current state code.  A state code is a row of clusters; the tag of a group
// sits at the same bit positions in every state code that contains it.
//
// The detector is programmable: `mask` selects the address bits the detector
// looks at (the bits of its cluster; other bits are ignored), and `tag` is
// the value those bits must hold.  Because clusters may be resized when the
// pattern set is updated, a mask can take any set of bits, which also lets
// clusters share (overlap) address bits.  A detector with an all-zero mask is
// unused and never fires.  Tags are numbered from 1, so a state that carries
// no group of a cluster has 0 in that cluster and matches none of its tags.
// Purely combinational.
//
// Origin: the published architecture gives the detector's job (spot one group
// tag in the state code) and calls for a programmable one; the masked compare
// is this design's circuit for it.
module group_detector #(
  parameter int unsigned CODE_W = sam_fsm_pkg::CODE_W_DEF
) (
  input  logic [CODE_W-1:0] state_code,
  input  logic [CODE_W-1:0] mask,
  input  logic [CODE_W-1:0] tag,
  output logic              hit
);

  assign hit = (|mask) && ((state_code & mask) == (tag & mask));

endmodule
