// tb_priority_decoder: all 16 combinations of fired lengths; the stride must
// be the longest fired length minus one, 00 when only single characters (or
// nothing) fired.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_priority_decoder;
  import sam_fsm_pkg::*;
  logic [3:0] m;
  stride_e    p;
  int checks = 0, failures = 0;

  priority_decoder #(.MAX_SC(4)) dut (.m_any(m), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp;
      exp = 0;
      m = 4'(v);
      #1;
      if (v[3]) exp = 3; else if (v[2]) exp = 2; else if (v[1]) exp = 1;
      checks++;
      if (int'(p) != exp) begin
        failures++;
        $display("FAIL m=%b p=%0d exp=%0d", m, p, exp);
      end
    end
    // M4 = 1 gives P1P0 = 11
    m = 4'b1000; #1;
    checks++;
    if (p != STRIDE_4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
