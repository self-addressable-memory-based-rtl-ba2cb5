// tb_sam_fsm_pipelined: four packet lanes through the pipelined SAM-FSM.
//
// An Aho-Corasick machine for the patterns SHE, HERS, HIS and a few random
// ones is built and state-encoded by sam_tb_pkg and programmed through the
// global row ports (rows fall into all four sub-arrays).  Each lane streams
// its own random packets, sometimes pausing.  For every character taken,
// the expected result is found by a brute-force search of the packet text
// (the longest pattern ending at that character), independent of the state
// table, and must appear exactly four clocks later with the lane number.
// Also checked: lane_ready serves the lanes in turn, one per clock.
// Counted: matches per lane, hits per sub-array, idle lane slots, restarts.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_sam_fsm_pipelined;
  import sam_fsm_pkg::*;
  import sam_tb_pkg::*;

  localparam int N = 32, CW = 64, NP = 9, MW = 4;

  logic          clk = 0, rst_n = 0;
  logic          cfg_we, mem_we;
  logic [4:0]    cfg_row, mem_row;
  logic [CW-1:0] cfg_mask, cfg_tag, mem_code;
  logic [7:0]    cfg_char;
  logic [MW-1:0] mem_match, match_id;
  logic [3:0]    lane_valid, lane_ready, lane_sop;
  logic [7:0]    lane_ch [4];
  logic          match_valid;
  logic [1:0]    match_lane;

  sam_fsm_pipelined #(.N_ROWS(N), .CODE_W(CW), .N_PATTERNS(NP), .MATCH_W(MW), .A_W(5)) dut (
    .clk, .rst_n, .cfg_we, .cfg_row, .cfg_mask, .cfg_tag, .cfg_char,
    .mem_we, .mem_row, .mem_code, .mem_match,
    .lane_valid, .lane_ready, .lane_ch, .lane_sop,
    .match_valid, .match_lane, .match_id);

  always #5 clk = ~clk;

  sam_table tbl;
  string    pats [$];
  string    text [4];
  int       pos  [4];
  int       exp_id [$];
  int       exp_lane [$];
  int checks = 0, failures = 0;
  int n_match [4], n_sub [4], n_idle = 0, n_restart = 0, n_taken = 0;
  int last_ready = -1;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string rand_text(int len, string alphabet);
    string t = "";
    for (int i = 0; i < len; i++) t = {t, rand_char(alphabet)};
    return t;
  endfunction

  int pipe_id [4] = '{default: -1};
  int pipe_ln [4];

  always @(posedge clk) if (rst_n && tbl != null) begin
    int l;
    // lane service order
    checks++;
    if (!$onehot(lane_ready)) begin failures++; $display("FAIL lane_ready %b", lane_ready); end
    for (int i = 0; i < 4; i++) if (lane_ready[i]) l = i;
    if (last_ready >= 0 && l != (last_ready + 1) % 4) begin
      failures++; $display("FAIL lane order %0d after %0d", l, last_ready);
    end
    last_ready = l;
    // result due now: taken four clocks ago
    if (pipe_id[3] >= 0) begin
      checks++;
      if (match_valid != (pipe_id[3] != 0) || (pipe_id[3] != 0 &&
          (int'(match_id) != pipe_id[3] || int'(match_lane) != pipe_ln[3]))) begin
        failures++;
        $display("FAIL t=%0t lane %0d: match_valid=%b id=%0d lane=%0d expected id %0d", $time,
                 pipe_ln[3], match_valid, match_id, match_lane, pipe_id[3]);
      end
      if (match_valid) n_match[match_lane]++;
    end else begin
      checks++;
      if (match_valid) begin failures++; $display("FAIL match with no character"); end
    end
    for (int i = 3; i > 0; i--) begin pipe_id[i] = pipe_id[i-1]; pipe_ln[i] = pipe_ln[i-1]; end
    pipe_id[0] = -1;
    if (lane_valid[l]) begin
      pipe_id[0] = int'(find_match(pats, text[l].substr(0, pos[l]), pos[l]));
      pipe_ln[0] = l;
      if (pos[l] == 0) n_restart++;
      pos[l]++;
      n_taken++;
    end else n_idle++;
    for (int i = 0; i < 4; i++) if (dut.o_hit[i]) n_sub[i]++;
    // drive the lanes for the next clock
    for (int k = 0; k < 4; k++) begin
      lane_valid[k] <= 1'b0;
      lane_sop[k]   <= 1'b0;
      if (pos[k] >= text[k].len()) begin
        text[k] = rand_text(1 + int'($urandom % 40), "SHEIRXABC");
        pos[k]  = 0;
      end
      if (($urandom % 100) < 85) begin
        lane_valid[k] <= 1'b1;
        lane_ch[k]    <= text[k][pos[k]];
        lane_sop[k]   <= (pos[k] == 0);
      end
    end
  end

  initial begin
    pats = '{"SHE", "HERS", "HIS", "ABC", "CAB", "BCA", "SHIRE", "AAB", "RISE"};
    cfg_we = 0; mem_we = 0; cfg_row = '0; mem_row = '0; cfg_mask = '0; cfg_tag = '0;
    cfg_char = '0; mem_code = '0; mem_match = '0;
    lane_valid = '0; lane_sop = '0;
    for (int l = 0; l < 4; l++) begin lane_ch[l] = '0; text[l] = ""; pos[l] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    begin
      sam_table t;
      t = new();
      t.build_ac(pats);
      t.encode();
      $display("machine: %0d states, %0d clusters, %0d-bit codes", t.n, t.n_clusters, t.code_w);
      checks++;
      if (t.n > N || t.code_w > CW) begin failures++; $display("FAIL machine too large"); end
      for (int k = 0; k < int'(t.n); k++) begin
        @(negedge clk);
        mem_we = 1; mem_row = 5'(k); mem_code = t.code[k][CW-1:0]; mem_match = MW'(t.match[k]);
        cfg_we = (k != 0); cfg_row = 5'(k); cfg_mask = t.mask[k][CW-1:0];
        cfg_tag = t.tag[k][CW-1:0]; cfg_char = (k != 0) ? t.str[k][0] : 8'h0;
      end
      @(negedge clk); mem_we = 0; cfg_we = 0;
      @(posedge clk);
      tbl = t;
    end
    repeat (6000) @(posedge clk);
    for (int l = 0; l < 4; l++) begin
      $display("lane %0d matches %0d", l, n_match[l]);
      checks++;
      if (n_match[l] == 0) begin failures++; $display("FAIL no match on lane %0d", l); end
    end
    for (int i = 0; i < 4; i++) begin
      $display("sub-array %0d hits %0d", i, n_sub[i]);
      checks++;
      if (n_sub[i] == 0) begin failures++; $display("FAIL sub-array %0d never hit", i); end
    end
    $display("characters %0d, idle slots %0d, packet restarts %0d", n_taken, n_idle, n_restart);
    checks++;
    if (n_idle == 0 || n_restart == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
