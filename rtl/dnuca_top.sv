// dnuca_top: 16-tile DNUCA multicore memory system.
//
// Every tile t of the 4x4 mesh holds a private L1 data cache (l1_cache), one
// bank of the shared last-level cache (llc_bank) and a network interface
// (tile_ni) on its router of the mesh (mesh_noc). The L2 bank of tile t is the
// static home of the blocks whose low block-address bits equal t; blocks can
// migrate to other banks, are found again by the home's broadcast search and
// are tracked in each L1 by location bits.
//
// Outside the design and brought out as ports: the 16 cores (one load/store
// port each, valid/ready request, one response pulse) and the memory
// controller, which sits on the network interface of tile MEM_TILE and receives
// M_MEM_RD / M_MEM_WB messages on mem_in_* and answers with M_MEM_DATA messages
// on mem_out_* (addressed with dst_mask = the requesting bank, dst_unit = L2).
// ev_* are per-tile event pulses for statistics.
//
// Sizes default to the document's configuration: 32 kB 4-way L1, 256 kB 8-way
// L2 bank, 64-byte lines, 4x4 mesh with three virtual networks. Buffer depths,
// MSHR count and the memory controller's position are this design's choices.
module dnuca_top
  import dnuca_pkg::*;
#(
  parameter int unsigned L1_SETS     = 128,
  parameter int unsigned L1_WAYS     = 4,
  parameter int unsigned L2_SETS     = 512,
  parameter int unsigned L2_WAYS     = 8,
  parameter int unsigned NMSHR       = 8,
  parameter int unsigned LEVEL       = 1,
  parameter bit          USE_RX_COND = 1'b0,
  parameter bit          SMART_BCAST = 1'b1,
  parameter bit          MIGRATE     = 1'b1,
  parameter int unsigned MEM_TILE    = 0,
  parameter int unsigned NOC_DEPTH   = 4,
  parameter int unsigned NI_DEPTH    = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 core_req_valid [N_TILES],
  output logic                 core_req_ready [N_TILES],
  input  logic                 core_req_we    [N_TILES],
  input  logic [ADDR_W-1:0]    core_req_addr  [N_TILES],
  input  logic [WORD_BITS-1:0] core_req_wdata [N_TILES],
  output logic                 core_resp_valid[N_TILES],
  output logic [WORD_BITS-1:0] core_resp_rdata[N_TILES],
  output logic                 mem_in_valid,
  output msg_t                 mem_in_msg,
  input  logic                 mem_in_ready,
  input  logic                 mem_out_valid,
  input  msg_t                 mem_out_msg,
  output logic                 mem_out_ready,
  output tmask_t               ev_bcast,
  output tmask_t               ev_mig_start,
  output tmask_t               ev_mig_done,
  output tmask_t               ev_mig_abort,
  output tmask_t               ev_retry,
  output tmask_t               ev_mem_fetch
);
  logic             rt_in_valid [N_TILES];
  msg_t             rt_in_msg   [N_TILES];
  logic [NVNET-1:0] rt_in_ready [N_TILES];
  logic             rt_out_valid[N_TILES];
  msg_t             rt_out_msg  [N_TILES];
  logic [NVNET-1:0] rt_out_ready[N_TILES];

  mesh_noc #(.DEPTH(NOC_DEPTH)) u_noc (
    .clk, .rst_n,
    .loc_in_valid (rt_in_valid),
    .loc_in_msg   (rt_in_msg),
    .loc_in_ready (rt_in_ready),
    .loc_out_valid(rt_out_valid),
    .loc_out_msg  (rt_out_msg),
    .loc_out_ready(rt_out_ready)
  );

  logic t_mem_in_valid[N_TILES];
  msg_t t_mem_in_msg  [N_TILES];
  logic t_mem_out_rdy [N_TILES];

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    logic l1_out_valid[NVNET], l1_out_ready[NVNET];
    logic l2_out_valid[NVNET], l2_out_ready[NVNET];
    msg_t l1_out_msg[NVNET], l2_out_msg[NVNET];
    logic l1_in_valid[NVNET], l1_in_ready[NVNET];
    logic l2_in_valid[NVNET], l2_in_ready[NVNET];
    msg_t l1_in_msg[NVNET], l2_in_msg[NVNET];
    localparam bit HM = (t == MEM_TILE);

    tile_ni #(.TILE(t), .HAS_MEM(HM), .IDEPTH(NI_DEPTH)) u_ni (
      .clk, .rst_n,
      .l1_out_valid, .l1_out_msg, .l1_out_ready,
      .l2_out_valid, .l2_out_msg, .l2_out_ready,
      .mem_out_valid(HM ? mem_out_valid : 1'b0),
      .mem_out_msg  (mem_out_msg),
      .mem_out_ready(t_mem_out_rdy[t]),
      .l1_in_valid, .l1_in_msg, .l1_in_ready,
      .l2_in_valid, .l2_in_msg, .l2_in_ready,
      .mem_in_valid (t_mem_in_valid[t]),
      .mem_in_msg   (t_mem_in_msg[t]),
      .mem_in_ready (HM ? mem_in_ready : 1'b1),
      .rt_in_valid  (rt_in_valid[t]),
      .rt_in_msg    (rt_in_msg[t]),
      .rt_in_ready  (rt_in_ready[t]),
      .rt_out_valid (rt_out_valid[t]),
      .rt_out_msg   (rt_out_msg[t]),
      .rt_out_ready (rt_out_ready[t])
    );

    l1_cache #(.TILE(t), .SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1 (
      .clk, .rst_n,
      .core_req_valid (core_req_valid[t]),
      .core_req_ready (core_req_ready[t]),
      .core_req_we    (core_req_we[t]),
      .core_req_addr  (core_req_addr[t]),
      .core_req_wdata (core_req_wdata[t]),
      .core_resp_valid(core_resp_valid[t]),
      .core_resp_rdata(core_resp_rdata[t]),
      .in_valid (l1_in_valid),
      .in_msg   (l1_in_msg),
      .in_ready (l1_in_ready),
      .out_valid(l1_out_valid),
      .out_msg  (l1_out_msg),
      .out_ready(l1_out_ready)
    );

    llc_bank #(.TILE(t), .SETS(L2_SETS), .WAYS(L2_WAYS), .NMSHR(NMSHR), .LEVEL(LEVEL),
               .USE_RX_COND(USE_RX_COND), .SMART_BCAST(SMART_BCAST), .MIGRATE(MIGRATE),
               .MEM_TILE(MEM_TILE)) u_l2 (
      .clk, .rst_n,
      .in_valid (l2_in_valid),
      .in_msg   (l2_in_msg),
      .in_ready (l2_in_ready),
      .out_valid(l2_out_valid),
      .out_msg  (l2_out_msg),
      .out_ready(l2_out_ready),
      .ev_bcast    (ev_bcast[t]),
      .ev_mig_start(ev_mig_start[t]),
      .ev_mig_done (ev_mig_done[t]),
      .ev_mig_abort(ev_mig_abort[t]),
      .ev_retry    (ev_retry[t]),
      .ev_mem_fetch(ev_mem_fetch[t])
    );
  end

  assign mem_in_valid  = t_mem_in_valid[MEM_TILE];
  assign mem_in_msg    = t_mem_in_msg[MEM_TILE];
  assign mem_out_ready = t_mem_out_rdy[MEM_TILE];
endmodule
