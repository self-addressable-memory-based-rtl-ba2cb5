// tb_lookahead_window: feeds random beats of 1..4 characters, grouped into
// packets, and consumes random strides of 1..avail whenever the window is
// ready.  A queue model of the character stream gives the expected window
// contents, `avail` (characters up to the end of D0's packet) and `ready`.
// Counts every stride value (base mode and strides 2, 3 and 4).
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_lookahead_window;
  import sam_fsm_pkg::*;
  typedef struct { logic sop; logic eop; logic [7:0] ch; } byte_t;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, in_sop, in_eop;
  logic [31:0] in_chars;
  logic [2:0]  in_cnt;
  logic [7:0]  win [4];
  logic        win_sop, win_eop, ready, consume;
  logic [2:0]  avail;
  stride_e     stride;
  byte_t       q [$];
  int checks = 0, failures = 0;
  int stride_seen [4];
  int pkt_left = 0;

  lookahead_window #(.MAX_SC(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_chars, .in_cnt,
    .in_sop, .in_eop, .win, .win_sop, .win_eop, .avail, .ready, .consume, .stride);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_chars = '0; in_cnt = 3'd1; in_sop = 0; in_eop = 0;
    consume = 0; stride = STRIDE_1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int exp_avail;
      bit exp_ready, stop;
      @(negedge clk);
      // new beat
      in_valid = ($urandom % 100) < 80;
      if (pkt_left == 0) begin pkt_left = 1 + int'($urandom % 12); in_sop = 1; end
      else in_sop = 0;
      in_cnt   = 3'(1 + ($urandom % 4));
      if (int'(in_cnt) > pkt_left) in_cnt = 3'(pkt_left);
      in_eop   = (int'(in_cnt) == pkt_left);
      in_chars = $urandom;
      // expected window view
      exp_avail = 0; stop = 0; exp_ready = (q.size() >= 4);
      for (int j = 0; j < 4; j++)
        if (!stop && j < q.size() && !(j > 0 && q[j].sop)) begin
          exp_avail++;
          if (q[j].eop) begin stop = 1; exp_ready = 1; end
        end else stop = 1;
      #1;
      checks++;
      if (int'(avail) != exp_avail || ready != exp_ready) begin
        failures++;
        $display("FAIL cyc %0d avail=%0d/%0d ready=%b/%b", i, avail, exp_avail, ready, exp_ready);
      end
      for (int j = 0; j < exp_avail; j++) begin
        checks++;
        if (win[j] != q[j].ch) begin failures++; $display("FAIL win[%0d]", j); end
      end
      if (exp_avail > 0) begin
        checks++;
        if (win_sop != q[0].sop || win_eop != q[0].eop) begin failures++; $display("FAIL flags"); end
      end
      consume = ready && (($urandom % 100) < 85);
      stride  = stride_e'((avail > 0) ? ($urandom % avail) : 0);
      #1;
      checks++;
      if (in_ready != (q.size() - (consume ? int'(stride) + 1 : 0) <= 4)) begin
        failures++;
        $display("FAIL in_ready=%b with %0d held", in_ready, q.size());
      end
      @(posedge clk);
      if (consume) begin
        stride_seen[int'(stride)]++;
        for (int j = 0; j <= int'(stride); j++) void'(q.pop_front());
      end
      if (in_valid && in_ready) begin
        for (int b = 0; b < int'(in_cnt); b++)
          q.push_back('{sop: in_sop && b == 0, eop: in_eop && b == int'(in_cnt) - 1,
                        ch: in_chars[b*8 +: 8]});
        pkt_left -= int'(in_cnt);
      end else if (in_sop) pkt_left = 0;  // beat not taken: start the packet again
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (stride_seen[s] == 0) begin failures++; $display("FAIL stride %0d never taken", s + 1); end
      $display("stride %0d taken %0d times", s + 1, stride_seen[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
