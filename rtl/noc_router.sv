// noc_router: five-port 2D-mesh router with three virtual networks.
//
// Ports are 0 = local (the tile's network interface), 1 = north (y-1),
// 2 = east (x+1), 3 = south (y+1), 4 = west (x-1). Each input port has one
// buffer per virtual network (vnet_fifo), so messages of different classes
// never block each other. Routing is deterministic XY: a message first travels
// along X until its column matches, then along Y. Each output port sends at most
// one message per cycle, chosen round-robin among the 15 input buffers whose head
// message routes to it and whose virtual network has room downstream.
//
// Link interface: *_valid and *_msg carry one whole message; *_ready has one bit
// per virtual network, telling the sender whether a message of that class would
// be accepted this cycle (it depends only on buffer fill levels). A message moves
// one hop per cycle when the path is free; buffering adds no extra cycle.
// Mesh, XY routing and three VNETs follow the document; buffer depth and the
// arbitration scheme are this design's own choices.
module noc_router
  import dnuca_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid [5],
  input  msg_t             in_msg   [5],
  output logic [NVNET-1:0] in_ready [5],
  output logic             out_valid[5],
  output msg_t             out_msg  [5],
  input  logic [NVNET-1:0] out_ready[5]
);
  localparam int unsigned NC = 5 * NVNET;

  logic fq_valid [5][NVNET];
  logic fq_ready [5][NVNET];
  msg_t fq_msg   [5][NVNET];
  logic fq_in_rdy[5][NVNET];

  for (genvar p = 0; p < 5; p++) begin : g_in
    for (genvar v = 0; v < NVNET; v++) begin : g_vc
      vnet_fifo #(.WIDTH(MSG_W), .DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .in_valid (in_valid[p] && (vnet_of(in_msg[p].mtype) == 2'(v))),
        .in_ready (fq_in_rdy[p][v]),
        .in_data  (in_msg[p]),
        .out_valid(fq_valid[p][v]),
        .out_ready(fq_ready[p][v]),
        .out_data (fq_msg[p][v])
      );
      assign in_ready[p][v] = fq_in_rdy[p][v];
    end
  end

  // XY route of a message
  function automatic logic [2:0] route(msg_t m);
    logic [2:0] dx, dy;
    dx = mesh_x(m.dst);
    dy = mesh_y(m.dst);
    if (dx > 3'(X))      return 3'd2;
    else if (dx < 3'(X)) return 3'd4;
    else if (dy > 3'(Y)) return 3'd3;
    else if (dy < 3'(Y)) return 3'd1;
    else                 return 3'd0;
  endfunction

  logic [$clog2(NC)-1:0] rr   [5];
  logic [NC-1:0]         req  [5];
  logic                  gnt_v[5];
  logic [$clog2(NC)-1:0] gnt  [5];

  always_comb begin
    for (int o = 0; o < 5; o++) begin
      for (int c = 0; c < NC; c++) begin
        req[o][c] = fq_valid[c/NVNET][c%NVNET]
                    && (route(fq_msg[c/NVNET][c%NVNET]) == 3'(o))
                    && out_ready[o][c%NVNET];
      end
      gnt_v[o] = 1'b0;
      gnt[o]   = '0;
      for (int k = 0; k < NC; k++) begin
        int c;
        c = (int'(rr[o]) + k) % NC;
        if (!gnt_v[o] && req[o][c]) begin
          gnt_v[o] = 1'b1;
          gnt[o]   = ($clog2(NC))'(c);
        end
      end
    end
    for (int p = 0; p < 5; p++)
      for (int v = 0; v < NVNET; v++)
        fq_ready[p][v] = 1'b0;
    for (int o = 0; o < 5; o++) begin
      out_valid[o] = gnt_v[o];
      out_msg[o]   = fq_msg[int'(gnt[o])/NVNET][int'(gnt[o])%NVNET];
      if (gnt_v[o]) fq_ready[int'(gnt[o])/NVNET][int'(gnt[o])%NVNET] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 5; o++) rr[o] <= '0;
    end else begin
      for (int o = 0; o < 5; o++)
        if (gnt_v[o]) rr[o] <= (gnt[o] == ($clog2(NC))'(NC-1)) ? '0 : gnt[o] + 1'b1;
    end
  end
endmodule
