// tb_memory_array: writes random rows, then raises each word line alone and
// checks the row read back in the same cycle, the root-row port, and that
// no word line reads zero with rhit low.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
module tb_memory_array;
  localparam int N = 23, W = 20;
  logic          clk = 0;
  logic          we;
  logic [4:0]    waddr;
  logic [W-1:0]  wdata, rdata, root;
  logic [N-1:0]  wl;
  logic          rhit;
  logic [W-1:0]  model [N];
  int checks = 0, failures = 0;

  memory_array #(.N_ROWS(N), .DATA_W(W), .A_W(5)) dut (
    .clk, .we, .waddr, .wdata, .word_line(wl), .rdata, .rhit, .root_data(root));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wl = '0; waddr = '0; wdata = '0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      we = 1; waddr = 5'(r); wdata = W'($urandom); model[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < N; r++) begin
        wl = '0; wl[r] = 1'b1; #1;
        checks++;
        if (!rhit || rdata != model[r]) begin
          failures++;
          $display("FAIL row %0d rdata=%h exp=%h", r, rdata, model[r]);
        end
      end
      // overwrite a few rows and re-check
      for (int i = 0; i < 5; i++) begin
        int r;
        r = int'($urandom % N);
        @(negedge clk);
        we = 1; waddr = 5'(r); wdata = W'($urandom); model[r] = wdata;
        @(negedge clk); we = 0;
      end
    end
    wl = '0; #1;
    checks++;
    if (rhit || rdata != '0) begin failures++; $display("FAIL read with no word line"); end
    checks++;
    if (root != model[0]) begin failures++; $display("FAIL root row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
