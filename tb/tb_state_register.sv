// tb_state_register: after reset and on a packet restart the evaluated code
// must be the root code; otherwise the last loaded code, which only changes
// when `advance` is high.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_state_register;
  localparam int W = 12;
  logic         clk = 0, rst_n = 0;
  logic         advance, restart;
  logic [W-1:0] next_code, root_code, eval_code, state_q;
  logic [W-1:0] held;
  logic         at_root;
  int checks = 0, failures = 0;

  state_register #(.CODE_W(W)) dut (.clk, .rst_n, .advance, .restart, .next_code,
                                    .root_code, .eval_code, .state_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; restart = 0; next_code = '0; root_code = 12'h5A5;
    at_root = 1; held = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      advance   = ($urandom % 3) != 0;
      restart   = ($urandom % 5) == 0;
      next_code = W'($urandom);
      if (($urandom % 20) == 0) root_code = W'($urandom);
      #1;
      checks++;
      if (eval_code != ((at_root || restart) ? root_code : held)) begin
        failures++;
        $display("FAIL cycle %0d eval=%h", i, eval_code);
      end
      @(posedge clk);
      if (advance) begin held = next_code; at_root = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
