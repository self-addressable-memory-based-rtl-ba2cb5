// tb_onehot_encoder: every single word line of a 37-line encoder, plus the
// all-zero case.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_onehot_encoder;
  localparam int N = 37;
  logic [N-1:0] oh;
  logic [5:0]   addr;
  logic         valid;
  int checks = 0, failures = 0;

  onehot_encoder #(.N(N), .A_W(6)) dut (.onehot(oh), .addr(addr), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh = '0; #1;
    checks++;
    if (valid) begin failures++; $display("FAIL valid with no line"); end
    for (int i = 0; i < N; i++) begin
      oh = '0; oh[i] = 1'b1; #1;
      checks++;
      if (!valid || int'(addr) != i) begin
        failures++;
        $display("FAIL line %0d addr=%0d valid=%b", i, addr, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
