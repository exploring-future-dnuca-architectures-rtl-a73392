// tb_dnuca_top: end-to-end test of the 16-tile DNUCA system at reduced cache
// sizes (L1 4 sets x 2 ways, L2 4 sets x 2 ways per bank) so that conflicts,
// evictions, migrations and broadcast searches happen within a short run.
// The stimulus and checks are in dnuca_tb_body.svh.
`timescale 1ns/1ps
module tb_dnuca_top;
  import dnuca_pkg::*;
  localparam int NOPS       = 150;
  localparam int POOL       = 48;
  localparam int POOL_HOMES = 4;
  localparam int POOL_SETS  = 4;
  localparam longint LIMIT  = 400000;

  logic                 clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  logic                 core_req_valid [N_TILES];
  logic                 core_req_ready [N_TILES];
  logic                 core_req_we    [N_TILES];
  logic [ADDR_W-1:0]    core_req_addr  [N_TILES];
  logic [WORD_BITS-1:0] core_req_wdata [N_TILES];
  logic                 core_resp_valid[N_TILES];
  logic [WORD_BITS-1:0] core_resp_rdata[N_TILES];
  logic mem_in_valid, mem_in_ready, mem_out_valid, mem_out_ready;
  msg_t mem_in_msg, mem_out_msg;
  tmask_t ev_bcast, ev_mig_start, ev_mig_done, ev_mig_abort, ev_retry, ev_mem_fetch;

  dnuca_top #(.L1_SETS(4), .L1_WAYS(2), .L2_SETS(4), .L2_WAYS(2)) u_dut (.*);

  `include "dnuca_tb_body.svh"
endmodule
