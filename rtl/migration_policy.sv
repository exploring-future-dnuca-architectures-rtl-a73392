// migration_policy: set-congestion metric and migration decisions of one L2 bank.
//
// For every set s the bank counts accesses (requests it receives for the set)
// and replacements (valid blocks evicted from the set). The congestion metric is
// M_s = replacements_s / accesses_s, kept as a fixed-point fraction with
// METRIC_FRAC fractional bits in a per-set register that is recomputed whenever
// the set's counters change. Running sums S1 = sum(M_s) and S2 = sum(M_s^2) over
// all sets give the mean mu = S1/SETS and the variance S2/SETS - mu^2 without
// walking the sets.
//
//   trigger (sender side):   M_s >= mu + LEVEL * sigma      (and M_s > 0)
//   accept (receiver side):  M_sender >= M_s                 and, when
//                            USE_RX_COND, M_s < mu + sigma
//
// The inequalities are evaluated exactly in integers, multiplying both sides by
// SETS and squaring: with A = SETS*M_s - S1 and V = SETS*S2 - S1^2,
// M_s >= mu + L*sigma  <=>  A >= 0 and A^2 >= L^2 * V.
//
// Interface: q_set selects the set that q_metric, q_trigger and q_rx_ok describe
// (combinational). upd_* records one access and/or one replacement of upd_set at
// the next clock edge. Counters are 16 bits; when an access counter would
// overflow, both counters of the set are halved, which keeps their ratio.
//
// The metric, the mean-plus-L-sigma test and both acceptance conditions are the
// document's (Section 4.4, eq. 4.1-4.4). The extra "M_s > 0" guard, the counter
// widths, the halving and the fixed-point format are this design's choices.
module migration_policy
  import dnuca_pkg::*;
#(
  parameter int unsigned SETS        = 512,
  parameter int unsigned LEVEL       = 1,
  parameter bit          USE_RX_COND = 1'b0,
  localparam int unsigned SW         = $clog2(SETS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] q_set,
  input  metric_t       q_sender_metric,
  output metric_t       q_metric,
  output logic          q_trigger,
  output logic          q_rx_ok,
  input  logic          upd_valid,
  input  logic [SW-1:0] upd_set,
  input  logic          upd_acc,
  input  logic          upd_rep
);
  localparam int unsigned CW  = 16;
  localparam int unsigned S1W = METRIC_W + SW;
  localparam int unsigned S2W = 2 * METRIC_W + SW;
  localparam int unsigned BW  = 2 * (METRIC_W + SW) + 4;

  logic [CW-1:0]  acc [SETS];
  logic [CW-1:0]  rep [SETS];
  metric_t        m   [SETS];
  logic [S1W-1:0] s1;
  logic [S2W-1:0] s2;

  // ---------------- queries ----------------
  logic signed [BW-1:0] a_q, b_q, v_s;

  always_comb begin
    q_metric = m[q_set];
    v_s = signed'(BW'(s2) << SW) - signed'(BW'(s1)) * signed'(BW'(s1));
    a_q = signed'(BW'(q_metric) << SW) - signed'(BW'(s1));
    q_trigger = (q_metric != '0) && (a_q >= 0)
                && (a_q * a_q >= signed'(BW'(LEVEL * LEVEL)) * v_s);
    b_q = a_q;
    q_rx_ok = (q_sender_metric >= q_metric)
              && (!USE_RX_COND || (b_q < 0) || (b_q * b_q < v_s));
  end

  // ---------------- updates ----------------
  logic [CW-1:0] acc_n, rep_n;
  metric_t       m_n;

  always_comb begin
    acc_n = acc[upd_set];
    rep_n = rep[upd_set];
    if (upd_acc && acc_n == '1) begin
      acc_n = acc_n >> 1;
      rep_n = rep_n >> 1;
    end
    if (upd_acc) acc_n = acc_n + 1'b1;
    if (upd_rep && rep_n != '1) rep_n = rep_n + 1'b1;
    if (rep_n > acc_n) acc_n = rep_n;   // a replacement is always caused by an access
    if (acc_n == '0) m_n = '0;
    else m_n = metric_t'(({rep_n, METRIC_FRAC'(0)}) / (CW + METRIC_FRAC)'(acc_n));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        acc[s] <= '0;
        rep[s] <= '0;
        m[s]   <= '0;
      end
      s1 <= '0;
      s2 <= '0;
    end else if (upd_valid && (upd_acc || upd_rep)) begin
      acc[upd_set] <= acc_n;
      rep[upd_set] <= rep_n;
      m[upd_set]   <= m_n;
      s1 <= s1 - S1W'(m[upd_set]) + S1W'(m_n);
      s2 <= s2 - S2W'(m[upd_set]) * S2W'(m[upd_set]) + S2W'(m_n) * S2W'(m_n);
    end
  end
endmodule
