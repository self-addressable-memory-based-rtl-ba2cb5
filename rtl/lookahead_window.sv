// lookahead_window: the character shift register of the look-ahead decoder.
//
// It holds 2*MAX_SC packet characters: positions 0..MAX_SC-1 are the flip-
// flops D0..D3 whose characters the input decoders see (position 0 = D0 is
// the oldest character, the next one the FSM consumes), positions
// MAX_SC..2*MAX_SC-1 are the staging bytes D4..D7 refilled from the packet
// FIFO.  In base mode one character moves out per clock; when the priority
// decoder reports a super character of n characters, the window shifts by n,
// so e.g. with n = 4 the character in D4 goes straight into D0.  The per-
// register stride multiplexers of the look-ahead decoder are written here as
// one shift by `stride`, which selects the same sources.
//
// Every character carries packet start/end flags.  `avail` counts the
// characters from D0 that are present and belong to the packet of D0 (up to
// and including its end), capped at MAX_SC.  `ready` asks the engine to
// step: the window holds MAX_SC characters, or the packet of D0 ends inside
// the window (nothing more of it will come).  The engine answers with
// `consume` and the stride it took (1..avail).
//
// Refill: a beat of up to MAX_SC characters is taken from the FIFO when at
// most MAX_SC characters remain after this clock's shift, so a beat always
// fits and, with the FIFO kept non-empty, D0..D3 never run dry in the middle
// of a packet: the engine can step every clock.  This makes `in_ready`
// depend combinationally on `consume` and `stride`.
//
// Origin: the eight-character register with stride-controlled shifting
// (D7..D4 feeding D3..D0, D4 going straight to D0 on a stride of four)
// follows the published look-ahead decoder; the beat interface, the packet
// flags and when a step may be taken are choices of this design.
module lookahead_window
  import sam_fsm_pkg::*;
#(
  parameter int unsigned MAX_SC = MAX_SC_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // beat from the packet FIFO: chars[0] is the earliest character
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [MAX_SC*CHAR_W-1:0] in_chars,
  input  logic [2:0]               in_cnt,      // 1..MAX_SC characters
  input  logic                     in_sop,      // first character starts a packet
  input  logic                     in_eop,      // last character ends a packet
  // to the decoders
  output logic [CHAR_W-1:0]        win [MAX_SC],
  output logic                     win_sop,     // D0 is the first character of a packet
  output logic                     win_eop,     // D0 is the last character of a packet
  output logic [2:0]               avail,
  output logic                     ready,
  input  logic                     consume,
  input  stride_e                  stride
);

  localparam int unsigned DEPTH = 2 * MAX_SC;

  typedef struct packed {
    logic              sop;
    logic              eop;
    logic [CHAR_W-1:0] ch;
  } slot_t;

  slot_t        q [DEPTH];
  logic [3:0]   cnt;

  // characters that leave this clock
  logic [3:0]   n_out;
  assign n_out    = consume ? 4'(stride) + 4'd1 : 4'd0;
  assign in_ready = (cnt - n_out <= 4'(MAX_SC));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      automatic slot_t      nq [DEPTH];
      automatic logic [3:0] ncnt = cnt - n_out;
      for (int unsigned i = 0; i < DEPTH; i++)
        nq[i] = (i + 32'(n_out) < DEPTH) ? q[i + 32'(n_out)] : '0;
      if (in_valid && in_ready) begin
        for (int unsigned b = 0; b < MAX_SC; b++)
          if (b < 32'(in_cnt)) begin
            nq[32'(ncnt) + b].ch  = in_chars[b*CHAR_W +: CHAR_W];
            nq[32'(ncnt) + b].sop = in_sop && (b == 0);
            nq[32'(ncnt) + b].eop = in_eop && (b == 32'(in_cnt) - 1);
          end
        ncnt = ncnt + 4'(in_cnt);
      end
      q   <= nq;
      cnt <= ncnt;
    end

  always_comb begin
    automatic logic stop = 1'b0;
    avail   = '0;
    ready   = (cnt >= 4'(MAX_SC));
    for (int unsigned j = 0; j < MAX_SC; j++) begin
      win[j] = q[j].ch;
      if (!stop && j < 32'(cnt) && !(j > 0 && q[j].sop)) begin
        avail = avail + 3'd1;
        if (q[j].eop) begin
          stop  = 1'b1;
          ready = 1'b1;
        end
      end else begin
        stop = 1'b1;
      end
    end
    win_sop = q[0].sop;
    win_eop = q[0].eop;
  end

  // the engine may only take characters that are there
  a_stride: assert property (@(posedge clk) disable iff (!rst_n)
                             consume |-> (32'(stride) < 32'(avail)))
    else $error("lookahead_window: stride beyond available characters");

endmodule
