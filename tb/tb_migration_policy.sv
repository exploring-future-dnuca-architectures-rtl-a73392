// tb_migration_policy: self-checking test of migration_policy (8 sets).
// Random access/replacement updates are applied to random sets; a model keeps
// the counters and metric M = replacements/accesses per set. After each update
// every set is queried and compared with the document's rules computed in
// real arithmetic: q_metric equals the fixed-point metric, q_trigger equals
// (M > 0 and M >= mu + L*sigma) for L = 1 and L = 2 (two instances), and q_rx_ok
// equals (M_sender >= M) and, for the instance with the optional receiver
// condition, also M < mu + sigma. Cases within 1e-9 of the threshold are not
// counted (rounding).
`timescale 1ns/1ps
module tb_migration_policy;
  import dnuca_pkg::*;
  localparam int SETS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [2:0] q_set = '0, upd_set = '0;
  metric_t q_sender_metric = '0;
  metric_t q_metric1, q_metric2;
  logic q_trigger1, q_trigger2, q_rx_ok1, q_rx_ok2;
  logic upd_valid = 1'b0, upd_acc = 1'b0, upd_rep = 1'b0;
  int checks = 0, failures = 0;
  int acc[SETS], rep[SETS];
  int n_trig = 0;

  migration_policy #(.SETS(SETS), .LEVEL(1), .USE_RX_COND(1'b0)) dut1 (
    .clk, .rst_n, .q_set, .q_sender_metric, .q_metric(q_metric1), .q_trigger(q_trigger1),
    .q_rx_ok(q_rx_ok1), .upd_valid, .upd_set, .upd_acc, .upd_rep);
  migration_policy #(.SETS(SETS), .LEVEL(2), .USE_RX_COND(1'b1)) dut2 (
    .clk, .rst_n, .q_set, .q_sender_metric, .q_metric(q_metric2), .q_trigger(q_trigger2),
    .q_rx_ok(q_rx_ok2), .upd_valid, .upd_set, .upd_acc, .upd_rep);

  function automatic int mfix(int s);
    return (acc[s] == 0) ? 0 : (rep[s] * 256) / acc[s];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    foreach (acc[s]) begin acc[s] = 0; rep[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      upd_valid = 1'b1;
      // skew the sets so that some are far more congested than the others
      upd_set = 3'(($urandom % 4 == 0) ? ($urandom % 2) : ($urandom % SETS));
      upd_acc = 1'b1;
      upd_rep = ($urandom % 100) < ((upd_set < 2) ? 80 : 15);
      @(posedge clk);
      acc[upd_set]++;
      if (upd_rep) rep[upd_set]++;
      #1;
      upd_valid = 1'b0;
      begin
        real mu, var_, sg;
        mu = 0; var_ = 0;
        for (int s = 0; s < SETS; s++) mu += real'(mfix(s)) / 256.0;
        mu = mu / SETS;
        for (int s = 0; s < SETS; s++) var_ += (real'(mfix(s)) / 256.0) ** 2;
        var_ = var_ / SETS - mu * mu;
        if (var_ < 0) var_ = 0;
        sg = $sqrt(var_);
        for (int s = 0; s < SETS; s++) begin
          real m, ms;
          q_set = 3'(s);
          q_sender_metric = metric_t'($urandom % 300);
          #1;
          m  = real'(mfix(s)) / 256.0;
          ms = real'(q_sender_metric) / 256.0;
          check(int'(q_metric1) == mfix(s) && int'(q_metric2) == mfix(s), "metric");
          if (m - (mu + sg) > 1e-9 || (mu + sg) - m > 1e-9) begin
            check(q_trigger1 == (m > 0 && m >= mu + sg), "trigger L=1");
            check(q_rx_ok2 == (ms >= m && m < mu + sg), "receiver condition");
          end
          if (m - (mu + 2 * sg) > 1e-9 || (mu + 2 * sg) - m > 1e-9)
            check(q_trigger2 == (m > 0 && m >= mu + 2 * sg), "trigger L=2");
          check(q_rx_ok1 == (ms >= m), "receiver M_i >= M_j");
          if (q_trigger1) n_trig++;
        end
      end
    end
    check(n_trig > 0, "trigger never fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
