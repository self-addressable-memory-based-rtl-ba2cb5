// tb_memory_decoder: programs the three-pattern example machine (SHE, HERS,
// HIS: states S0..S9, groups G1..G9 packed into four clusters of a 6-bit
// code) and checks the raised word line for every state code and several
// characters against the transition list of the machine.  Then programs
// super characters of 2, 3 and 4 characters that compete with the single-
// character rows and checks that the longest one present wins, that its
// stride code is right and that `avail` limits what can fire.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_memory_decoder;
  import sam_fsm_pkg::*;
  localparam int CW = 6, N = 12;

  logic          clk = 0, rst_n = 0;
  logic          cfg_we;
  logic [3:0]    cfg_row;
  logic [CW-1:0] cfg_mask, cfg_tag, code;
  stride_e       cfg_len;
  logic [31:0]   cfg_chars;
  logic [7:0]    win [4];
  logic [2:0]    avail;
  logic [N-1:0]  wl;
  logic          any_hit;
  stride_e       stride;
  int checks = 0, failures = 0;

  memory_decoder #(.N_ROWS(N), .CODE_W(CW), .MAX_SC(4), .A_W(4)) dut (
    .clk, .rst_n, .cfg_we, .cfg_row, .cfg_mask, .cfg_tag, .cfg_len, .cfg_chars,
    .state_code(code), .win, .avail, .word_line(wl), .any_hit, .stride);

  always #5 clk = ~clk;

  logic [CW-1:0] gmask [1:9] = '{6'b100000, 6'b011100, 6'b011100, 6'b000010, 6'b011100,
                                 6'b011100, 6'b011100, 6'b000001, 6'b011100};
  logic [CW-1:0] gtag  [1:9] = '{6'b100000, 6'b000100, 6'b001000, 6'b000010, 6'b001100,
                                 6'b010000, 6'b010100, 6'b000001, 6'b011000};
  logic [CW-1:0] scode [0:9] = '{6'b100010, 6'b100100, 6'b101011, 6'b100010, 6'b101111,
                                 6'b110010, 6'b010110, 6'b100100, 6'b011010, 6'b100100};
  logic [9:0] gmem [1:9] = '{10'b1010111111, 10'b1010000010, 10'b0000000100,
                             10'b0101111101, 10'b0000010000, 10'b0000100000,
                             10'b0001000000, 10'b0000010100, 10'b0100000000};
  byte gch [1:9] = '{"S", "H", "E", "H", "E", "R", "S", "I", "S"};

  task automatic prog_row(int row, logic [CW-1:0] m, logic [CW-1:0] t, int len, string s);
    @(negedge clk);
    cfg_we = 1; cfg_row = 4'(row); cfg_mask = m; cfg_tag = t; cfg_len = stride_e'(len - 1);
    cfg_chars = '0;
    for (int j = 0; j < s.len(); j++) cfg_chars[j*8 +: 8] = s[j];
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic expect_wl(string what, int row, int len);
    #1;
    checks++;
    if (row == 0) begin
      if (wl != '0 || any_hit) begin
        failures++; $display("FAIL %s: expected no word line, got %b", what, wl);
      end
    end else if (wl != (N'(1) << row) || !any_hit || int'(stride) != len - 1) begin
      failures++;
      $display("FAIL %s: expected row %0d len %0d, got %b stride %0d", what, row, len, wl, stride);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string chars = "SHEIRX";
    cfg_we = 0; cfg_row = '0; cfg_mask = '0; cfg_tag = '0; cfg_len = STRIDE_1; cfg_chars = '0;
    code = '0; avail = 3'd4;
    for (int j = 0; j < 4; j++) win[j] = "Z";
    repeat (2) @(negedge clk);
    rst_n = 1;
    // nothing programmed: nothing fires
    code = scode[1]; win[0] = "H";
    expect_wl("after reset", 0, 1);
    for (int k = 1; k <= 9; k++) prog_row(k, gmask[k], gtag[k], 1, string'(gch[k]));
    for (int s = 0; s <= 9; s++)
      for (int c = 0; c < chars.len(); c++) begin
        int exp;
        exp = 0;
        for (int k = 1; k <= 9; k++) if (gmem[k][s] && gch[k] == chars[c]) exp = k;
        code = scode[s]; win[0] = chars[c];
        expect_wl($sformatf("S%0d on %s", s, chars.substr(c, c)), exp, 1);
      end
    // super characters from S1 (group G2, "H..."): row 10 = "HIS" (len 3),
    // row 11 = "HERS" (len 4), both competing with row 2 = "H"
    prog_row(10, gmask[2], gtag[2], 3, "HIS");
    prog_row(11, gmask[2], gtag[2], 4, "HERS");
    code = scode[1];
    win[0] = "H"; win[1] = "I"; win[2] = "S"; win[3] = "Q";
    expect_wl("HISQ from S1", 10, 3);
    win[1] = "E"; win[2] = "R"; win[3] = "S";
    expect_wl("HERS from S1", 11, 4);
    avail = 3'd3;
    expect_wl("HERS with 3 available", 2, 1);
    avail = 3'd4;
    win[3] = "T";
    expect_wl("HERT from S1", 2, 1);
    // from S0 (not in G2) the super characters do not fire; "H" goes to S4
    code = scode[0];
    expect_wl("HERS from S0", 4, 1);
    // two-character super character on G4 states
    prog_row(10, gmask[4], gtag[4], 2, "HE");
    code = scode[3]; win[0] = "H"; win[1] = "E";
    expect_wl("HE from S3", 10, 2);
    avail = 3'd1;
    expect_wl("HE with 1 available", 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
