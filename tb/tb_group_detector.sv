// tb_group_detector: checks tag recognition on the cluster layout of the
// three-pattern example (SHE, HERS, HIS): clusters C1 = bit 5, C2 = bits 4..2,
// C3 = bit 1, C4 = bit 0 of a 6-bit code.  Every group detector is checked
// against every state code, with the expected result worked out from the
// group membership lists, and then random masks/tags against a bit-wise
// reference.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_group_detector;
  localparam int CW = 6;
  logic [CW-1:0] code, mask, tag;
  logic          hit;
  int checks = 0, failures = 0;

  group_detector #(.CODE_W(CW)) dut (.state_code(code), .mask(mask), .tag(tag), .hit(hit));

  // group signatures G1..G9 (mask, tag)
  logic [CW-1:0] gmask [1:9] = '{6'b100000, 6'b011100, 6'b011100, 6'b000010, 6'b011100,
                                 6'b011100, 6'b011100, 6'b000001, 6'b011100};
  logic [CW-1:0] gtag  [1:9] = '{6'b100000, 6'b000100, 6'b001000, 6'b000010, 6'b001100,
                                 6'b010000, 6'b010100, 6'b000001, 6'b011000};
  // state codes S0..S9 (S0 carries G1 and G4)
  logic [CW-1:0] scode [0:9] = '{6'b100010, 6'b100100, 6'b101011, 6'b100010, 6'b101111,
                                 6'b110010, 6'b010110, 6'b100100, 6'b011010, 6'b100100};
  // membership: bit s of gmem[g] = state s is in group g
  logic [9:0] gmem [1:9] = '{10'b1010111111, 10'b1010000010, 10'b0000000100,
                             10'b0101111101, 10'b0000010000, 10'b0000100000,
                             10'b0001000000, 10'b0000010100, 10'b0100000000};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 1; g <= 9; g++)
      for (int s = 0; s <= 9; s++) begin
        code = scode[s]; mask = gmask[g]; tag = gtag[g];
        #1;
        checks++;
        if (hit !== gmem[g][s]) begin
          failures++;
          $display("FAIL G%0d S%0d hit=%b", g, s, hit);
        end
      end
    // unused detector
    mask = '0; tag = '0; code = '0; #1;
    checks++;
    if (hit) begin failures++; $display("FAIL zero mask fired"); end
    // random
    for (int i = 0; i < 2000; i++) begin
      logic exp;
      code = CW'($urandom); mask = CW'($urandom); tag = CW'($urandom) & mask;
      #1;
      exp = (mask != 0);
      for (int b = 0; b < CW; b++)
        if (mask[b] && code[b] != tag[b]) exp = 1'b0;
      checks++;
      if (hit !== exp) begin
        failures++;
        $display("FAIL code=%b mask=%b tag=%b hit=%b", code, mask, tag, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
