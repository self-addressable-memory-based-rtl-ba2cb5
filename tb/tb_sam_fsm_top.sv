// tb_sam_fsm_top: end-to-end test of both engines at the default size
// (1718 state rows, 151-bit state codes, 500-pattern match tags, super
// characters of up to four characters), with no parameter changed.
//
// Look-ahead engine: a random machine of 64 states with super characters of
// 1..4 characters is state-encoded, and its rows are spread over the whole
// 1718-row memory (table row k goes to memory row 53*k mod 1718).  Random
// packets are streamed in beats and every step is checked against the
// reference model (length, state code entered, match tag and offset).
// Pipelined engine: an Aho-Corasick machine for 16 patterns (SHE, HERS, HIS
// and random ones), spread the same way so that all four sub-arrays hold
// states; four lanes stream random packets and every character's result,
// four clocks later, is checked against a brute-force pattern search.
// Every mechanism is counted and must occur: each stride 1..4, return to the
// root, packet restart, FIFO push-back, match on each engine and each lane,
// idle lane slot, hit in each sub-array.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_sam_fsm_top;
  import sam_fsm_pkg::*;
  import sam_tb_pkg::*;

  localparam int N  = N_STATES_DEF;
  localparam int CW = CODE_W_DEF;
  localparam int MW = match_w(N_PATTERNS_DEF);
  localparam int AW = $clog2(N);

  logic            clk = 0, rst_n = 0;
  // look-ahead engine
  logic            eng_cfg_we, eng_mem_we;
  logic [AW-1:0]   eng_cfg_row, eng_mem_row;
  logic [CW-1:0]   eng_cfg_mask, eng_cfg_tag, eng_mem_code, eng_state_code;
  stride_e         eng_cfg_len;
  logic [31:0]     eng_cfg_chars, eng_in_chars;
  logic [MW-1:0]   eng_mem_match, eng_match_id;
  logic            eng_in_valid, eng_in_ready, eng_in_sop, eng_in_eop;
  logic [2:0]      eng_in_cnt, eng_step_len;
  logic            eng_step_valid, eng_match_valid;
  logic [15:0]     eng_match_end;
  // pipelined engine
  logic            pl_cfg_we, pl_mem_we;
  logic [AW-1:0]   pl_cfg_row, pl_mem_row;
  logic [CW-1:0]   pl_cfg_mask, pl_cfg_tag, pl_mem_code;
  logic [7:0]      pl_cfg_char;
  logic [MW-1:0]   pl_mem_match, pl_match_id;
  logic [3:0]      pl_lane_valid, pl_lane_ready, pl_lane_sop;
  logic [7:0]      pl_lane_ch [4];
  logic            pl_match_valid;
  logic [1:0]      pl_match_lane;

  sam_fsm_top dut (.*);

  always #5 clk = ~clk;

  function automatic int hw_row(int k);
    return (k * 53) % N;
  endfunction

  sam_table et, pt;
  string    pats [$];
  int checks = 0, failures = 0;
  bit  running = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ look-ahead engine
  typedef struct { int len; logic [CW-1:0] code; int id; int last; } step_t;
  step_t expq [$];
  int n_stride [4], n_root = 0, n_restart = 0, n_backpressure = 0, n_ematch = 0;

  task automatic model_packet(string text);
    int unsigned s = 0, pos = 0;
    n_restart++;
    while (pos < text.len()) begin
      int unsigned nx, l, e;
      e = (pos + 4 < text.len()) ? pos + 3 : text.len() - 1;
      et.ref_step(s, text.substr(pos, e), nx, l);
      expq.push_back('{len: l, code: et.code[nx][CW-1:0], id: et.match[nx], last: pos + l - 1});
      n_stride[l-1]++;
      if (nx == 0) n_root++;
      s = nx;
      pos += l;
    end
  endtask

  task automatic send_packet(string text);
    int pos = 0;
    while (pos < text.len()) begin
      int c = 1 + int'($urandom % 4);
      if (c > text.len() - pos) c = text.len() - pos;
      @(negedge clk);
      eng_in_valid = 1; eng_in_cnt = 3'(c); eng_in_sop = (pos == 0);
      eng_in_eop = (pos + c == text.len());
      eng_in_chars = '0;
      for (int b = 0; b < c; b++) eng_in_chars[b*8 +: 8] = text[pos + b];
      #1;
      while (!eng_in_ready) begin
        n_backpressure++;
        @(negedge clk);
        #1;
      end
      pos += c;
      @(posedge clk);
    end
    @(negedge clk); eng_in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && eng_step_valid) begin
    step_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL engine: unexpected step");
    end else begin
      e = expq.pop_front();
      if (int'(eng_step_len) != e.len || eng_state_code != e.code
          || eng_match_valid != (e.id != 0) || (e.id != 0 && (int'(eng_match_id) != e.id
          || int'(eng_match_end) != e.last))) begin
        failures++;
        $display("FAIL engine step len=%0d/%0d match=%b id=%0d/%0d end=%0d/%0d",
                 eng_step_len, e.len, eng_match_valid, eng_match_id, e.id, eng_match_end, e.last);
      end
      if (eng_match_valid) n_ematch++;
    end
  end

  // -------------------------------------------------------- pipelined engine
  string text [4];
  int    pos  [4];
  int    pipe_id [4] = '{default: -1};
  int    pipe_ln [4];
  int    n_lmatch [4], n_sub [4], n_idle = 0, n_lrestart = 0;

  function automatic string rand_text(int len, string alphabet);
    string t = "";
    for (int i = 0; i < len; i++) t = {t, rand_char(alphabet)};
    return t;
  endfunction

  always @(posedge clk) if (rst_n && running) begin
    int l;
    l = 0;
    for (int i = 0; i < 4; i++) if (pl_lane_ready[i]) l = i;
    if (pipe_id[3] >= 0) begin
      checks++;
      if (pl_match_valid != (pipe_id[3] != 0) || (pipe_id[3] != 0 &&
          (int'(pl_match_id) != pipe_id[3] || int'(pl_match_lane) != pipe_ln[3]))) begin
        failures++;
        $display("FAIL lane %0d: match_valid=%b id=%0d expected %0d", pipe_ln[3],
                 pl_match_valid, pl_match_id, pipe_id[3]);
      end
      if (pl_match_valid) n_lmatch[pl_match_lane]++;
    end
    for (int i = 3; i > 0; i--) begin pipe_id[i] = pipe_id[i-1]; pipe_ln[i] = pipe_ln[i-1]; end
    pipe_id[0] = -1;
    if (pl_lane_valid[l]) begin
      pipe_id[0] = int'(find_match(pats, text[l].substr(0, pos[l]), pos[l]));
      pipe_ln[0] = l;
      if (pos[l] == 0) n_lrestart++;
      pos[l]++;
    end else n_idle++;
    for (int i = 0; i < 4; i++) if (dut.u_pipelined.o_hit[i]) n_sub[i]++;
    for (int k = 0; k < 4; k++) begin
      pl_lane_valid[k] <= 1'b0;
      pl_lane_sop[k]   <= 1'b0;
      if (pos[k] >= text[k].len()) begin
        text[k] = rand_text(1 + int'($urandom % 40), "SHEIRXABCD");
        pos[k]  = 0;
      end
      if (($urandom % 100) < 85) begin
        pl_lane_valid[k] <= 1'b1;
        pl_lane_ch[k]    <= text[k][pos[k]];
        pl_lane_sop[k]   <= (pos[k] == 0);
      end
    end
  end

  // --------------------------------------------------------------- stimulus
  initial begin
    string t;
    eng_cfg_we = 0; eng_mem_we = 0; eng_cfg_row = '0; eng_mem_row = '0; eng_cfg_mask = '0;
    eng_cfg_tag = '0; eng_cfg_len = STRIDE_1; eng_cfg_chars = '0; eng_mem_code = '0;
    eng_mem_match = '0; eng_in_valid = 0; eng_in_chars = '0; eng_in_cnt = 3'd1;
    eng_in_sop = 0; eng_in_eop = 0;
    pl_cfg_we = 0; pl_mem_we = 0; pl_cfg_row = '0; pl_mem_row = '0; pl_cfg_mask = '0;
    pl_cfg_tag = '0; pl_cfg_char = '0; pl_mem_code = '0; pl_mem_match = '0;
    pl_lane_valid = '0; pl_lane_sop = '0;
    for (int l = 0; l < 4; l++) begin pl_lane_ch[l] = '0; text[l] = ""; pos[l] = 0; end

    et = new();
    et.build_random(64, "ABC", 4, 40, 30);
    et.encode();
    pats = '{"SHE", "HERS", "HIS"};
    for (int i = 0; i < 13; i++) pats.push_back(rand_text(2 + int'($urandom % 3), "ABCDHIS"));
    pt = new();
    pt.build_ac(pats);
    pt.encode();
    $display("look-ahead machine: %0d states, %0d clusters, %0d-bit codes", et.n, et.n_clusters, et.code_w);
    $display("pipelined machine: %0d states, %0d clusters, %0d-bit codes", pt.n, pt.n_clusters, pt.code_w);
    checks++;
    if (et.code_w > CW || pt.code_w > CW || pt.n > 200) begin failures++; $display("FAIL machine too large"); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      eng_mem_we = 1; eng_mem_row = AW'(hw_row(k)); eng_mem_code = et.code[k][CW-1:0];
      eng_mem_match = MW'(et.match[k]);
      eng_cfg_we = (k != 0); eng_cfg_row = AW'(hw_row(k)); eng_cfg_mask = et.mask[k][CW-1:0];
      eng_cfg_tag = et.tag[k][CW-1:0];
      eng_cfg_len = stride_e'((k != 0) ? et.str[k].len() - 1 : 0);
      eng_cfg_chars = '0;
      if (k != 0) for (int j = 0; j < et.str[k].len(); j++) eng_cfg_chars[j*8 +: 8] = et.str[k][j];
    end
    @(negedge clk); eng_mem_we = 0; eng_cfg_we = 0;
    for (int k = 0; k < int'(pt.n); k++) begin
      @(negedge clk);
      pl_mem_we = 1; pl_mem_row = AW'(hw_row(k)); pl_mem_code = pt.code[k][CW-1:0];
      pl_mem_match = MW'(pt.match[k]);
      pl_cfg_we = (k != 0); pl_cfg_row = AW'(hw_row(k)); pl_cfg_mask = pt.mask[k][CW-1:0];
      pl_cfg_tag = pt.tag[k][CW-1:0]; pl_cfg_char = (k != 0) ? pt.str[k][0] : 8'h0;
    end
    @(negedge clk); pl_mem_we = 0; pl_cfg_we = 0;
    @(posedge clk);
    running = 1;

    for (int p = 0; p < 400; p++) begin
      int len;
      len = 1 + int'($urandom % 30);
      t = rand_text(len, "AAABBBCCCD");
      model_packet(t);
      send_packet(t);
    end
    for (int i = 0; i < 500 && expq.size() != 0; i++) @(negedge clk);
    running = 0;
    repeat (8) @(negedge clk);

    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d engine steps missing", expq.size()); end
    for (int s = 0; s < 4; s++) begin
      $display("engine stride %0d: %0d", s + 1, n_stride[s]);
      checks++;
      if (n_stride[s] == 0) begin failures++; $display("FAIL stride %0d never taken", s + 1); end
    end
    $display("engine: root returns %0d, restarts %0d, FIFO push-back %0d, matches %0d",
             n_root, n_restart, n_backpressure, n_ematch);
    checks++;
    if (n_root == 0 || n_restart == 0 || n_backpressure == 0 || n_ematch == 0) begin
      failures++; $display("FAIL engine mechanism missing");
    end
    for (int l = 0; l < 4; l++) begin
      $display("lane %0d matches %0d", l, n_lmatch[l]);
      checks++;
      if (n_lmatch[l] == 0) begin failures++; $display("FAIL no match on lane %0d", l); end
    end
    for (int i = 0; i < 4; i++) begin
      $display("sub-array %0d hits %0d", i, n_sub[i]);
      checks++;
      if (n_sub[i] == 0) begin failures++; $display("FAIL sub-array %0d never hit", i); end
    end
    $display("lanes: idle slots %0d, restarts %0d", n_idle, n_lrestart);
    checks++;
    if (n_idle == 0 || n_lrestart == 0) begin failures++; $display("FAIL lane mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
