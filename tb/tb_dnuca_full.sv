// tb_dnuca_full: end-to-end test of the 16-tile DNUCA system at the sizes of
// the evaluated configuration (L1 32 kB 4-way, L2 bank 256 kB 8-way, 4x4
// mesh), with the top's default parameters. The address pool is packed into
// two sets of two home banks, 16 lines per set, so that the 8-way L2 sets and
// 4-way L1 sets overflow and every mechanism (memory fetch, write-back, RETRY,
// broadcast search, migration) takes place. Stimulus and checks are in
// dnuca_tb_body.svh.
`timescale 1ns/1ps
module tb_dnuca_full;
  import dnuca_pkg::*;
  localparam int NOPS       = 300;
  localparam int POOL       = 64;
  localparam int POOL_HOMES = 2;
  localparam int POOL_SETS  = 2;
  localparam longint LIMIT  = 600000;

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

  dnuca_top u_dut (.*);

  `include "dnuca_tb_body.svh"
endmodule
