// tb_input_decoder: drives all 256 character values and checks that exactly
// the line with the character's number is high.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_input_decoder;
  import sam_fsm_pkg::*;
  logic [7:0]   ch;
  logic [255:0] oh;
  int checks = 0, failures = 0;

  input_decoder dut (.ch(ch), .onehot(oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      ch = 8'(v);
      #1;
      checks++;
      if (oh != (256'(1) << v)) begin
        failures++;
        $display("FAIL ch=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
