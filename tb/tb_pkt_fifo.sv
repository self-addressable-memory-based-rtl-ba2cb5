// tb_pkt_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags and that nothing is lost when the FIFO fills.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_pkt_fifo;
  localparam int W = 16, D = 8;
  logic         clk = 0, rst_n = 0;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, saw_full = 0;

  pkt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                        .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 100) < ((i < 1500) ? 70 : 30);
      out_ready = ($urandom % 100) < ((i < 1500) ? 30 : 70);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (in_ready != (q.size() < D) || out_valid != (q.size() > 0)) begin
        failures++;
        $display("FAIL flags size=%0d in_ready=%b out_valid=%b", q.size(), in_ready, out_valid);
      end
      if (!in_ready) saw_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin
          failures++;
          $display("FAIL data %h exp %h", out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
