// tb_sam_fsm_engine: end-to-end test of the look-ahead SAM-FSM engine.
//
// A random machine with super characters of 1..4 characters over the
// alphabet "ABC" is built and state-encoded by sam_tb_pkg, programmed
// through the cfg_*/mem_* ports, and random packets over "ABCD" ('D' labels
// no transition) are streamed in beats of 1..4 characters.  The reference
// model walks the same transition lists (longest matching string wins, no
// match returns to the root) and predicts every step: its length, the code
// of the state entered, the match tag and the match offset.  Counted: steps
// of each stride, returns to the root, packet restarts, cycles the FIFO
// pushed back.  Rate check: a long packet sent back to back must give one
// step per clock.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_sam_fsm_engine;
  import sam_fsm_pkg::*;
  import sam_tb_pkg::*;

  localparam int N = 32, CW = 64, NP = 7, MSC = 4, MW = 3;

  logic            clk = 0, rst_n = 0;
  logic            cfg_we, mem_we;
  logic [4:0]      cfg_row, mem_row;
  logic [CW-1:0]   cfg_mask, cfg_tag, mem_code, state_code;
  stride_e         cfg_len;
  logic [31:0]     cfg_chars, in_chars;
  logic [MW-1:0]   mem_match, match_id;
  logic            in_valid, in_ready, in_sop, in_eop;
  logic [2:0]      in_cnt, step_len;
  logic            step_valid, match_valid;
  logic [15:0]     match_end;

  sam_fsm_engine #(.N_ROWS(N), .CODE_W(CW), .N_PATTERNS(NP), .MAX_SC(MSC), .FIFO_DEPTH(8),
                   .MATCH_W(MW), .A_W(5)) dut (
    .clk, .rst_n, .cfg_we, .cfg_row, .cfg_mask, .cfg_tag, .cfg_len, .cfg_chars,
    .mem_we, .mem_row, .mem_code, .mem_match,
    .in_valid, .in_ready, .in_chars, .in_cnt, .in_sop, .in_eop,
    .step_valid, .step_len, .match_valid, .match_id, .match_end, .state_code);

  always #5 clk = ~clk;

  typedef struct { int len; logic [CW-1:0] code; int id; int last; } step_t;
  step_t    expq [$];
  sam_table tbl;
  int checks = 0, failures = 0;
  int n_stride [4], n_root = 0, n_restart = 0, n_backpressure = 0, n_match = 0;
  longint cyc = 0;
  longint first_step_cyc = -1, last_step_cyc = -1;
  int     steps_in_window = 0;
  bit     measuring = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of one packet
  task automatic model_packet(string text);
    int unsigned s = 0, pos = 0;
    n_restart++;
    while (pos < text.len()) begin
      int unsigned nx, l, e;
      e = (pos + 4 < text.len()) ? pos + 3 : text.len() - 1;
      tbl.ref_step(s, text.substr(pos, e), nx, l);
      expq.push_back('{len: l, code: tbl.code[nx][CW-1:0], id: tbl.match[nx], last: pos + l - 1});
      n_stride[l-1]++;
      if (nx == 0) n_root++;
      s = nx;
      pos += l;
    end
  endtask

  task automatic send_packet(string text, bit full_beats);
    int pos = 0;
    while (pos < text.len()) begin
      int c = full_beats ? 4 : 1 + int'($urandom % 4);
      if (c > text.len() - pos) c = text.len() - pos;
      @(negedge clk);
      in_valid = 1; in_cnt = 3'(c); in_sop = (pos == 0); in_eop = (pos + c == text.len());
      in_chars = '0;
      for (int b = 0; b < c; b++) in_chars[b*8 +: 8] = text[pos + b];
      #1;
      while (!in_ready) begin
        n_backpressure++;
        @(negedge clk);
        #1;
      end
      pos += c;
      @(posedge clk);
      if (!full_beats && ($urandom % 4) == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
  endtask

  // checker
  always @(posedge clk) if (rst_n && step_valid) begin
    step_t e;
    if (measuring) begin
      if (first_step_cyc < 0) first_step_cyc = cyc;
      last_step_cyc = cyc;
      steps_in_window++;
    end
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected step");
    end else begin
      e = expq.pop_front();
      if (int'(step_len) != e.len || state_code != e.code
          || match_valid != (e.id != 0) || (e.id != 0 && (int'(match_id) != e.id
          || int'(match_end) != e.last))) begin
        failures++;
        $display("FAIL step len=%0d/%0d code=%h/%h match=%b id=%0d/%0d end=%0d/%0d",
                 step_len, e.len, state_code, e.code, match_valid, match_id, e.id,
                 match_end, e.last);
      end
      if (match_valid) n_match++;
    end
  end

  initial begin
    string text;
    tbl = new();
    tbl.build_random(N, "ABC", 4, NP, 40);
    tbl.encode();
    $display("machine: %0d rows, %0d clusters, %0d-bit codes", tbl.n, tbl.n_clusters, tbl.code_w);
    checks++;
    if (tbl.code_w > CW) begin failures++; $display("FAIL code too wide"); end
    cfg_we = 0; mem_we = 0; cfg_row = '0; mem_row = '0; cfg_mask = '0; cfg_tag = '0;
    cfg_len = STRIDE_1; cfg_chars = '0; mem_code = '0; mem_match = '0;
    in_valid = 0; in_chars = '0; in_cnt = 3'd1; in_sop = 0; in_eop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      mem_we = 1; mem_row = 5'(k); mem_code = tbl.code[k][CW-1:0]; mem_match = MW'(tbl.match[k]);
      cfg_we = (k != 0); cfg_row = 5'(k); cfg_mask = tbl.mask[k][CW-1:0];
      cfg_tag = tbl.tag[k][CW-1:0];
      cfg_len = stride_e'((k != 0) ? tbl.str[k].len() - 1 : 0);
      cfg_chars = '0;
      if (k != 0) for (int j = 0; j < tbl.str[k].len(); j++) cfg_chars[j*8 +: 8] = tbl.str[k][j];
    end
    @(negedge clk); mem_we = 0; cfg_we = 0;
    // random packets
    for (int p = 0; p < 300; p++) begin
      int len;
      len = 1 + int'($urandom % 30);
      text = "";
      for (int i = 0; i < len; i++) text = {text, rand_char("AAABBBCCCD")};
      model_packet(text);
      send_packet(text, 1'b0);
    end
    // rate: a long packet in full beats, back to back
    repeat (20) @(negedge clk);
    text = "";
    for (int i = 0; i < 400; i++) text = {text, rand_char("ABC")};
    model_packet(text);
    measuring = 1;
    send_packet(text, 1'b1);
    repeat (40) @(negedge clk);
    measuring = 0;
    checks++;
    if (last_step_cyc - first_step_cyc + 1 != steps_in_window) begin
      failures++;
      $display("FAIL rate: %0d steps in %0d clocks", steps_in_window, last_step_cyc - first_step_cyc + 1);
    end
    $display("rate: %0d steps in %0d clocks for 400 characters", steps_in_window,
             last_step_cyc - first_step_cyc + 1);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d steps missing", expq.size()); end
    for (int s = 0; s < 4; s++) begin
      $display("stride %0d: %0d", s + 1, n_stride[s]);
      checks++;
      if (n_stride[s] == 0) begin failures++; $display("FAIL stride %0d never taken", s + 1); end
    end
    $display("root returns %0d, packet restarts %0d, FIFO push-back cycles %0d, matches %0d",
             n_root, n_restart, n_backpressure, n_match);
    checks += 3;
    if (n_root == 0 || n_match == 0 || n_backpressure == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
