// tb_sam_fsm_workload: rule-set workloads on the full-size design (1718
// rows, 151-bit codes, 9-bit match tags; no parameter changed).
//
// For each rule set the testbench makes random patterns with the pattern
// and character counts of the published evaluation (5 patterns / 98
// characters, 20 / 334, 50 / 663, 100 / 1291), builds their Aho-Corasick
// machine without state collapsing, state-encodes it, and checks that it
// fits the built memory (rows and code width).  The machine is loaded into
// both engines; rows left over from the previous rule set are disabled.
// Packets of random text with patterns planted in them are then scanned:
// the look-ahead engine one packet after another, the pipelined engine on
// four lanes at once.  Every step's match result is compared with a
// brute-force search of the packet for the longest pattern ending at that
// character.  Larger published rule sets (200..500 patterns) have more
// characters than the memory has rows unless states are collapsed, so they
// are not run here.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_sam_fsm_workload;
  import sam_fsm_pkg::*;
  import sam_tb_pkg::*;

  localparam int N  = N_STATES_DEF;
  localparam int CW = CODE_W_DEF;
  localparam int MW = match_w(N_PATTERNS_DEF);
  localparam int AW = $clog2(N);
  localparam string ALPHA = "ABCDEFGHIJKLMNOPQRSTUVWXYZ0123456789";

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

  sam_table t;
  string    pats [$];
  int checks = 0, failures = 0;
  bit running = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string rand_text(int len);
    string s = "";
    for (int i = 0; i < len; i++) s = {s, rand_char(ALPHA)};
    return s;
  endfunction

  // random text of about `len` characters with patterns planted in it
  function automatic string packet_text(int len);
    string s = "";
    while (s.len() < len) begin
      if ($urandom % 3 == 0) s = {s, pats[$urandom % pats.size()]};
      else s = {s, rand_text(1 + int'($urandom % 8))};
    end
    return s;
  endfunction

  // ------------------------------------------------------ look-ahead engine
  typedef struct { int id; int last; } exp_t;
  exp_t expq [$];
  int n_ematch = 0;

  task automatic send_packet(string text);
    int pos = 0;
    for (int i = 0; i < text.len(); i++)
      expq.push_back('{id: int'(find_match(pats, text, i)), last: i});
    while (pos < text.len()) begin
      int c;
      c = 1 + int'($urandom % 4);
      if (c > text.len() - pos) c = text.len() - pos;
      @(negedge clk);
      eng_in_valid = 1; eng_in_cnt = 3'(c); eng_in_sop = (pos == 0);
      eng_in_eop = (pos + c == text.len());
      eng_in_chars = '0;
      for (int b = 0; b < c; b++) eng_in_chars[b*8 +: 8] = text[pos + b];
      #1;
      while (!eng_in_ready) begin
        @(negedge clk);
        #1;
      end
      pos += c;
      @(posedge clk);
    end
    @(negedge clk); eng_in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && eng_step_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL engine: unexpected step");
    end else begin
      e = expq.pop_front();
      if (eng_step_len != 3'd1 || eng_match_valid != (e.id != 0)
          || (e.id != 0 && (int'(eng_match_id) != e.id || int'(eng_match_end) != e.last))) begin
        failures++;
        $display("FAIL engine step len=%0d match=%b id=%0d/%0d end=%0d/%0d",
                 eng_step_len, eng_match_valid, eng_match_id, e.id, eng_match_end, e.last);
      end
      if (eng_match_valid) n_ematch++;
    end
  end

  // -------------------------------------------------------- pipelined engine
  string text [4];
  int    pos  [4];
  int    pipe_id [4] = '{default: -1};
  int    pipe_ln [4];
  int    n_lmatch = 0, n_lchar = 0;

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
      if (pl_match_valid) n_lmatch++;
    end
    for (int i = 3; i > 0; i--) begin pipe_id[i] = pipe_id[i-1]; pipe_ln[i] = pipe_ln[i-1]; end
    pipe_id[0] = -1;
    if (pl_lane_valid[l]) begin
      pipe_id[0] = int'(find_match(pats, text[l].substr(0, pos[l]), pos[l]));
      pipe_ln[0] = l;
      pos[l]++;
      n_lchar++;
    end
    for (int k = 0; k < 4; k++) begin
      pl_lane_valid[k] <= 1'b0;
      pl_lane_sop[k]   <= 1'b0;
      if (pos[k] >= text[k].len()) begin
        text[k] = packet_text(20 + int'($urandom % 40));
        pos[k]  = 0;
      end
      if (($urandom % 100) < 90) begin
        pl_lane_valid[k] <= 1'b1;
        pl_lane_ch[k]    <= text[k][pos[k]];
        pl_lane_sop[k]   <= (pos[k] == 0);
      end
    end
  end

  // ------------------------------------------------------------- rule sets
  task automatic make_patterns(int n_pat, int n_char);
    int left = n_char;
    pats.delete();
    for (int p = 0; p < n_pat; p++) begin
      int len;
      string s;
      len = (p == n_pat - 1) ? left : left / (n_pat - p) - 4 + int'($urandom % 9);
      if (len < 2) len = 2;
      // no duplicates: a repeated pattern would be the same machine state
      do s = rand_text(len); while (s inside {pats});
      pats.push_back(s);
      left -= len;
    end
  endtask

  task automatic load(int prev_n);
    for (int k = 0; k < ((int'(t.n) > prev_n) ? int'(t.n) : prev_n); k++) begin
      bit used;
      used = (k < int'(t.n));
      @(negedge clk);
      eng_mem_we = used; pl_mem_we = used;
      eng_mem_row = AW'(k); pl_mem_row = AW'(k);
      eng_mem_code = used ? t.code[k][CW-1:0] : '0;
      pl_mem_code  = eng_mem_code;
      eng_mem_match = used ? MW'(t.match[k]) : '0;
      pl_mem_match  = eng_mem_match;
      // row 0 (the root) has no detector; unused rows get a zero mask
      eng_cfg_we = (k != 0); pl_cfg_we = (k != 0);
      eng_cfg_row = AW'(k); pl_cfg_row = AW'(k);
      eng_cfg_mask = (used && k != 0) ? t.mask[k][CW-1:0] : '0;
      pl_cfg_mask  = eng_cfg_mask;
      eng_cfg_tag = used ? t.tag[k][CW-1:0] : '0;
      pl_cfg_tag  = eng_cfg_tag;
      eng_cfg_len = STRIDE_1;
      eng_cfg_chars = (used && k != 0) ? 32'(t.str[k][0]) : '0;
      pl_cfg_char   = (used && k != 0) ? t.str[k][0] : 8'h0;
    end
    @(negedge clk);
    eng_mem_we = 0; eng_cfg_we = 0; pl_mem_we = 0; pl_cfg_we = 0;
  endtask

  initial begin
    int sets_pat  [4] = '{5, 20, 50, 100};
    int sets_char [4] = '{98, 334, 663, 1291};
    int prev_n = 0;
    eng_cfg_we = 0; eng_mem_we = 0; eng_cfg_row = '0; eng_mem_row = '0; eng_cfg_mask = '0;
    eng_cfg_tag = '0; eng_cfg_len = STRIDE_1; eng_cfg_chars = '0; eng_mem_code = '0;
    eng_mem_match = '0; eng_in_valid = 0; eng_in_chars = '0; eng_in_cnt = 3'd1;
    eng_in_sop = 0; eng_in_eop = 0;
    pl_cfg_we = 0; pl_mem_we = 0; pl_cfg_row = '0; pl_mem_row = '0; pl_cfg_mask = '0;
    pl_cfg_tag = '0; pl_cfg_char = '0; pl_mem_code = '0; pl_mem_match = '0;
    pl_lane_valid = '0; pl_lane_sop = '0;
    for (int l = 0; l < 4; l++) begin pl_lane_ch[l] = '0; text[l] = ""; pos[l] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    foreach (sets_pat[r]) begin
      int em0, lm0;
      make_patterns(sets_pat[r], sets_char[r]);
      t = new();
      t.build_ac(pats);
      t.encode();
      $display("rule set %0d patterns / %0d characters: %0d states, %0d clusters, %0d-bit codes",
               sets_pat[r], sets_char[r], t.n, t.n_clusters, t.code_w);
      checks++;
      if (t.n > N || t.code_w > CW) begin
        failures++;
        $display("FAIL rule set does not fit %0d rows x %0d bits", N, CW);
        continue;
      end
      load(prev_n);
      prev_n = int'(t.n);
      em0 = n_ematch; lm0 = n_lmatch;
      for (int l = 0; l < 4; l++) begin text[l] = ""; pos[l] = 0; end
      for (int i = 0; i < 4; i++) pipe_id[i] = -1;
      @(posedge clk);
      running = 1;
      for (int p = 0; p < 40; p++) send_packet(packet_text(20 + int'($urandom % 60)));
      for (int i = 0; i < 500 && expq.size() != 0; i++) @(negedge clk);
      running = 0;
      @(negedge clk);
      pl_lane_valid = '0;
      repeat (8) @(negedge clk);
      checks++;
      if (expq.size() != 0) begin
        failures++; $display("FAIL %0d engine steps missing", expq.size());
        expq.delete();
      end
      $display("  look-ahead engine matches %0d, pipelined engine matches %0d",
               n_ematch - em0, n_lmatch - lm0);
      checks++;
      if (n_ematch == em0 || n_lmatch == lm0) begin
        failures++; $display("FAIL no match seen for this rule set");
      end
    end
    $display("pipelined characters scanned %0d", n_lchar);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
