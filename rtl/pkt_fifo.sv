// pkt_fifo: synchronous FIFO that buffers packet-character beats in front of
// the look-ahead window (one beat = up to four characters plus their count
// and packet start/end flags, packed into WIDTH bits by the caller).
// Standard valid/ready on both sides; a beat is written when in_valid &&
// in_ready and leaves when out_valid && out_ready.  First-word fall-through:
// the head beat is on out_data while out_valid is high.  DEPTH must be a
// power of two.
//
// Origin: the published look-ahead decoder only shows a FIFO in front of the
// shift register; its depth, width and handshake are choices of this design.
module pkt_fifo #(
  parameter int unsigned WIDTH = 40,
  parameter int unsigned DEPTH = sam_fsm_pkg::FIFO_DEPTH_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned P_W = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [P_W:0]     wr_ptr, rd_ptr;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  assign in_ready  = (wr_ptr - rd_ptr) != (P_W+1)'(DEPTH);
  assign out_valid = (wr_ptr != rd_ptr);
  assign out_data  = mem[rd_ptr[P_W-1:0]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end

  always_ff @(posedge clk)
    if (do_wr) mem[wr_ptr[P_W-1:0]] <= in_data;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("pkt_fifo: DEPTH must be a power of two");

endmodule
