// tb_smart_bcast_table: self-checking test of smart_bcast_table (16 sets,
// 4-bit counters). Random increments and decrements of random sets, with
// simultaneous increment and decrement of the same set, against a model; each
// cycle every set is read back: rd_count must equal the model and rd_nonzero
// must be high exactly when the count is above zero (the condition for a
// broadcast search). Counters saturate at both ends.
`timescale 1ns/1ps
module tb_smart_bcast_table;
  localparam int SETS = 16, CW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] rd_set = '0, inc_set = '0, dec_set = '0;
  logic rd_nonzero, inc = 1'b0, dec = 1'b0;
  logic [CW-1:0] rd_count;
  int checks = 0, failures = 0;
  int model[SETS];

  smart_bcast_table #(.SETS(SETS), .CW(CW)) dut (.*);

  initial begin
    foreach (model[s]) model[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      inc = ($urandom % 100) < (i < 1500 ? 60 : 25);
      dec = ($urandom % 100) < (i < 1500 ? 25 : 60);
      inc_set = 4'($urandom % 6);
      dec_set = ($urandom % 4 == 0) ? inc_set : 4'($urandom % 6);
      @(posedge clk);
      begin
        if (inc && dec && inc_set == dec_set) ;
        else begin
          if (inc && model[inc_set] < (1 << CW) - 1) model[inc_set]++;
          if (dec && model[dec_set] > 0) model[dec_set]--;
        end
      end
      #1;
      inc = 1'b0; dec = 1'b0;
      for (int s = 0; s < SETS; s++) begin
        rd_set = 4'(s);
        #1;
        checks++;
        if (rd_count != CW'(model[s]) || rd_nonzero != (model[s] != 0)) begin
          failures++;
          $display("FAIL set %0d count %0d model %0d", s, rd_count, model[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
