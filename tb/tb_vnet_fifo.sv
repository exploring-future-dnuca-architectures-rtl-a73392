// tb_vnet_fifo: self-checking test of vnet_fifo (WIDTH 16, DEPTH 4).
// Random pushes and pops against a queue model: every popped word must be the
// oldest one pushed, in_ready must be high exactly when fewer than DEPTH words
// are held, out_valid exactly when at least one is held.
`timescale 1ns/1ps
module tb_vnet_fifo;
  localparam int W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  vnet_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(in_ready == (model.size() < D), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      if (out_valid && model.size() > 0) check(out_data == model[0], "out_data order");
      in_valid  = ($urandom % 100) < (i < 1000 ? 70 : 30);
      out_ready = ($urandom % 100) < (i < 1000 ? 30 : 70);
      in_data   = W'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the same edge as the DUT
  always @(posedge clk) if (rst_n) begin
    logic do_pop, do_push;
    do_pop  = out_valid && out_ready;
    do_push = in_valid && in_ready;
    if (do_pop) void'(model.pop_front());
    if (do_push) model.push_back(in_data);
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
