// mesh_noc: MESH_X x MESH_Y 2D mesh of noc_router instances.
//
// Tile t sits at column t % MESH_X and row t / MESH_X and owns the local port of
// its router. Neighbouring routers are joined by one link in each direction;
// ports at the mesh edge are tied off (never valid, never ready). The local
// ports are the network's interface: loc_in_* injects a message addressed by its
// dst field, loc_out_* ejects the messages addressed to the tile, with the same
// per-virtual-network ready bits as a router link. A message takes one cycle per
// router it crosses. The 4x4 mesh with XY routing and three virtual networks is
// the document's configuration.
module mesh_noc
  import dnuca_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             loc_in_valid [N_TILES],
  input  msg_t             loc_in_msg   [N_TILES],
  output logic [NVNET-1:0] loc_in_ready [N_TILES],
  output logic             loc_out_valid[N_TILES],
  output msg_t             loc_out_msg  [N_TILES],
  input  logic [NVNET-1:0] loc_out_ready[N_TILES]
);
  logic             r_in_valid [N_TILES][5];
  msg_t             r_in_msg   [N_TILES][5];
  logic [NVNET-1:0] r_in_ready [N_TILES][5];
  logic             r_out_valid[N_TILES][5];
  msg_t             r_out_msg  [N_TILES][5];
  logic [NVNET-1:0] r_out_ready[N_TILES][5];

  // neighbour of tile t through port p, or -1 at the edge
  function automatic int nb(int t, int p);
    int x, y;
    x = t % MESH_X;
    y = t / MESH_X;
    case (p)
      1: return (y > 0)                ? t - MESH_X : -1;
      2: return (x < int'(MESH_X) - 1) ? t + 1      : -1;
      3: return (y < int'(MESH_Y) - 1) ? t + MESH_X : -1;
      4: return (x > 0)                ? t - 1      : -1;
      default: return -1;
    endcase
  endfunction

  // port of the neighbour that faces back
  function automatic int opp(int p);
    case (p)
      1: return 3;
      2: return 4;
      3: return 1;
      4: return 2;
      default: return 0;
    endcase
  endfunction

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    noc_router #(.X(t % MESH_X), .Y(t / MESH_X), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid (r_in_valid[t]),
      .in_msg   (r_in_msg[t]),
      .in_ready (r_in_ready[t]),
      .out_valid(r_out_valid[t]),
      .out_msg  (r_out_msg[t]),
      .out_ready(r_out_ready[t])
    );
    assign r_in_valid[t][0]  = loc_in_valid[t];
    assign r_in_msg[t][0]    = loc_in_msg[t];
    assign loc_in_ready[t]   = r_in_ready[t][0];
    assign loc_out_valid[t]  = r_out_valid[t][0];
    assign loc_out_msg[t]    = r_out_msg[t][0];
    assign r_out_ready[t][0] = loc_out_ready[t];
    for (genvar p = 1; p < 5; p++) begin : g_port
      if (nb(t, p) >= 0) begin : g_link
        assign r_in_valid[t][p]  = r_out_valid[nb(t, p)][opp(p)];
        assign r_in_msg[t][p]    = r_out_msg[nb(t, p)][opp(p)];
        assign r_out_ready[t][p] = r_in_ready[nb(t, p)][opp(p)];
      end else begin : g_edge
        assign r_in_valid[t][p]  = 1'b0;
        assign r_in_msg[t][p]    = '0;
        assign r_out_ready[t][p] = '0;
      end
    end
  end
endmodule
