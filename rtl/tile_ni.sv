// tile_ni: network interface of one tile.
//
// Injection: the L1 controller and the L2 bank offer one message per virtual
// network each; on the tile that hosts it the memory controller offers its
// messages too. For every virtual network a round-robin arbiter takes one
// message into that network's holding register. A message carries a
// destination bit mask; the interface sends one unicast copy per set bit,
// lowest tile first, which is how a bank's broadcast search, invalidations and
// migration notifications leave the tile. The router's local port takes one
// message per cycle: the three holding registers are served round-robin among
// those whose virtual network has room. Keeping a register per virtual network
// means a blocked request never holds up a response. A source's ready is high
// in the cycle its message is taken.
//
// Ejection: a message leaving the router is written into the input buffer of
// the unit it addresses (dst_unit): one buffer per virtual network for the L1
// and for the L2, one buffer for the memory port. The router sees, per virtual
// network, ready only when every buffer that could take that class has room.
//
// The document only names network interface controllers; the multicast
// expansion, arbitration and buffer sizes are this design's choices.
module tile_ni
  import dnuca_pkg::*;
#(
  parameter int unsigned TILE    = 0,
  parameter bit          HAS_MEM = 1'b0,
  parameter int unsigned IDEPTH  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // sources
  input  logic             l1_out_valid[NVNET],
  input  msg_t             l1_out_msg  [NVNET],
  output logic             l1_out_ready[NVNET],
  input  logic             l2_out_valid[NVNET],
  input  msg_t             l2_out_msg  [NVNET],
  output logic             l2_out_ready[NVNET],
  input  logic             mem_out_valid,
  input  msg_t             mem_out_msg,
  output logic             mem_out_ready,
  // destinations
  output logic             l1_in_valid[NVNET],
  output msg_t             l1_in_msg  [NVNET],
  input  logic             l1_in_ready[NVNET],
  output logic             l2_in_valid[NVNET],
  output msg_t             l2_in_msg  [NVNET],
  input  logic             l2_in_ready[NVNET],
  output logic             mem_in_valid,
  output msg_t             mem_in_msg,
  input  logic             mem_in_ready,
  // router local port
  output logic             rt_in_valid,
  output msg_t             rt_in_msg,
  input  logic [NVNET-1:0] rt_in_ready,
  input  logic             rt_out_valid,
  input  msg_t             rt_out_msg,
  output logic [NVNET-1:0] rt_out_ready
);
  // ---------------- injection ----------------
  logic   hold_v[NVNET];
  msg_t   hold  [NVNET];
  tmask_t left  [NVNET];
  tile_t  low   [NVNET];
  logic [1:0] rr[NVNET];
  logic [2:0] src_v[NVNET];
  logic [1:0] pick [NVNET];
  logic       take [NVNET];
  logic [1:0] vrr;
  logic       send_v;
  logic [1:0] send_n;

  wire mem_here = mem_out_valid && HAS_MEM;

  always_comb begin
    for (int v = 0; v < NVNET; v++) begin
      src_v[v] = {mem_here && vnet_of(mem_out_msg.mtype) == 2'(v), l2_out_valid[v], l1_out_valid[v]};
      pick[v] = 2'd0;
      take[v] = 1'b0;
      for (int k = 0; k < 3; k++) begin
        int s;
        s = (int'(rr[v]) + k) % 3;
        if (!take[v] && src_v[v][s]) begin
          take[v] = 1'b1;
          pick[v] = 2'(s);
        end
      end
      if (hold_v[v]) take[v] = 1'b0;
      l1_out_ready[v] = take[v] && (pick[v] == 2'd0);
      l2_out_ready[v] = take[v] && (pick[v] == 2'd1);
      low[v] = '0;
      for (int t = N_TILES - 1; t >= 0; t--)
        if (left[v][t]) low[v] = tile_t'(t);
    end
    mem_out_ready = 1'b0;
    for (int v = 0; v < NVNET; v++)
      if (take[v] && pick[v] == 2'd2) mem_out_ready = 1'b1;
    // one message per cycle into the router
    send_v = 1'b0;
    send_n = '0;
    for (int k = 0; k < NVNET; k++) begin
      int v;
      v = (int'(vrr) + k) % NVNET;
      if (!send_v && hold_v[v] && left[v] != '0 && rt_in_ready[v]) begin
        send_v = 1'b1;
        send_n = 2'(v);
      end
    end
    rt_in_valid   = send_v;
    rt_in_msg     = hold[send_n];
    rt_in_msg.dst = low[send_n];
    rt_in_msg.src = tile_t'(TILE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVNET; v++) begin
        hold_v[v] <= 1'b0;
        hold[v]   <= '0;
        left[v]   <= '0;
        rr[v]     <= '0;
      end
      vrr <= '0;
    end else begin
      if (send_v) vrr <= (send_n == 2'(NVNET - 1)) ? '0 : send_n + 2'd1;
      for (int v = 0; v < NVNET; v++) begin
        if (take[v]) begin
          msg_t m;
          case (pick[v])
            2'd0:    m = l1_out_msg[v];
            2'd1:    m = l2_out_msg[v];
            default: m = mem_out_msg;
          endcase
          hold_v[v] <= 1'b1;
          hold[v]   <= m;
          left[v]   <= m.dst_mask;
          rr[v]     <= (pick[v] == 2'd2) ? 2'd0 : pick[v] + 2'd1;
        end else if (hold_v[v]) begin
          tmask_t nl;
          nl = left[v];
          if (send_v && send_n == 2'(v)) nl[low[v]] = 1'b0;
          left[v] <= nl;
          if (nl == '0) hold_v[v] <= 1'b0;
        end
      end
    end
  end

  // ---------------- ejection ----------------
  logic l1_q_rdy[NVNET], l2_q_rdy[NVNET];
  logic mem_q_rdy;
  wire [1:0] ev = vnet_of(rt_out_msg.mtype);

  for (genvar v = 0; v < NVNET; v++) begin : g_ej
    vnet_fifo #(.WIDTH(MSG_W), .DEPTH(IDEPTH)) u_l1q (
      .clk, .rst_n,
      .in_valid (rt_out_valid && rt_out_msg.dst_unit == UNIT_L1 && ev == 2'(v)),
      .in_ready (l1_q_rdy[v]),
      .in_data  (rt_out_msg),
      .out_valid(l1_in_valid[v]),
      .out_ready(l1_in_ready[v]),
      .out_data (l1_in_msg[v])
    );
    vnet_fifo #(.WIDTH(MSG_W), .DEPTH(IDEPTH)) u_l2q (
      .clk, .rst_n,
      .in_valid (rt_out_valid && rt_out_msg.dst_unit == UNIT_L2 && ev == 2'(v)),
      .in_ready (l2_q_rdy[v]),
      .in_data  (rt_out_msg),
      .out_valid(l2_in_valid[v]),
      .out_ready(l2_in_ready[v]),
      .out_data (l2_in_msg[v])
    );
    assign rt_out_ready[v] = l1_q_rdy[v] && l2_q_rdy[v] && (mem_q_rdy || !HAS_MEM);
  end

  vnet_fifo #(.WIDTH(MSG_W), .DEPTH(IDEPTH)) u_memq (
    .clk, .rst_n,
    .in_valid (rt_out_valid && rt_out_msg.dst_unit == UNIT_MEM),
    .in_ready (mem_q_rdy),
    .in_data  (rt_out_msg),
    .out_valid(mem_in_valid),
    .out_ready(mem_in_ready),
    .out_data (mem_in_msg)
  );
endmodule
