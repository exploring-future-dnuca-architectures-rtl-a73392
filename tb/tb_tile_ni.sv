// tb_tile_ni: self-checking test of tile_ni (tile 5, memory port present).
// Injection: the L1, the L2 and the memory port offer random messages on
// random virtual networks with random multi-bit destination masks; the router
// port takes them with a random ready per virtual network. Every message must
// come out once per destination bit, with dst set to that tile and src to this
// tile, and nothing else may come out. Ejection: random messages arrive from
// the router addressed to the L1, the L2 or the memory port; each must appear
// at the buffer of that unit and virtual network, in order, and never while
// the router side was told "not ready".
`timescale 1ns/1ps
module tb_tile_ni;
  import dnuca_pkg::*;
  localparam int TILE = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic l1_out_valid[NVNET], l1_out_ready[NVNET], l2_out_valid[NVNET], l2_out_ready[NVNET];
  msg_t l1_out_msg[NVNET], l2_out_msg[NVNET];
  logic mem_out_valid, mem_out_ready;
  msg_t mem_out_msg;
  logic l1_in_valid[NVNET], l1_in_ready[NVNET], l2_in_valid[NVNET], l2_in_ready[NVNET];
  msg_t l1_in_msg[NVNET], l2_in_msg[NVNET];
  logic mem_in_valid, mem_in_ready;
  msg_t mem_in_msg;
  logic rt_in_valid;
  msg_t rt_in_msg;
  logic [NVNET-1:0] rt_in_ready;
  logic rt_out_valid;
  msg_t rt_out_msg;
  logic [NVNET-1:0] rt_out_ready;
  int checks = 0, failures = 0;
  int expect_cnt[int];        // id -> copies still expected at the router
  tmask_t expect_mask[int];
  int n_inj = 0, n_copies = 0, n_ej = 0;
  msg_t ejq[3][NVNET][$];     // unit, vnet -> expected order

  tile_ni #(.TILE(TILE), .HAS_MEM(1'b1), .IDEPTH(4)) dut (.*);

  localparam mtype_e TYPES[3] = '{M_BCAST, M_INV_ACK, M_MIG_NTF};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic msg_t rnd(int id, int v);
    msg_t m;
    m = '0;
    m.mtype    = TYPES[v];
    m.dst_mask = tmask_t'($urandom) & tmask_t'($urandom);
    if (m.dst_mask == '0) m.dst_mask = tmask_t'(1) << ($urandom % N_TILES);
    m.aux      = 16'(id);
    m.data     = line_t'($urandom);
    return m;
  endfunction

  int nid = 1;
  bit tk1[NVNET], tk2[NVNET], tkm, tkr, tke;
  initial begin
    for (int v = 0; v < NVNET; v++) begin
      l1_out_valid[v] = 1'b0; l2_out_valid[v] = 1'b0; l1_out_msg[v] = '0; l2_out_msg[v] = '0;
      l1_in_ready[v] = 1'b0; l2_in_ready[v] = 1'b0;
    end
    mem_out_valid = 1'b0; mem_out_msg = '0; mem_in_ready = 1'b0;
    rt_in_ready = '0; rt_out_valid = 1'b0; rt_out_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i < 3500) begin
        for (int v = 0; v < NVNET; v++) begin
          if (!l1_out_valid[v] && $urandom % 4 == 0) begin l1_out_msg[v] = rnd(nid++, v); l1_out_valid[v] = 1'b1; end
          if (!l2_out_valid[v] && $urandom % 4 == 0) begin l2_out_msg[v] = rnd(nid++, v); l2_out_valid[v] = 1'b1; end
        end
        if (!mem_out_valid && $urandom % 4 == 0) begin mem_out_msg = rnd(nid++, 1); mem_out_valid = 1'b1; end
        if (!rt_out_valid && $urandom % 2 == 0) begin
          rt_out_msg = rnd(nid++, $urandom % 3);
          rt_out_msg.dst_unit = unit_e'($urandom % 3);
          rt_out_valid = 1'b1;
        end
      end
      rt_in_ready = 3'($urandom);
      for (int v = 0; v < NVNET; v++) begin
        l1_in_ready[v] = ($urandom % 2) != 0;
        l2_in_ready[v] = ($urandom % 2) != 0;
      end
      mem_in_ready = ($urandom % 2) != 0;
      #1;
      for (int v = 0; v < NVNET; v++) begin
        tk1[v] = l1_out_valid[v] && l1_out_ready[v];
        tk2[v] = l2_out_valid[v] && l2_out_ready[v];
      end
      tkm = mem_out_valid && mem_out_ready;
      tkr = rt_out_valid && rt_out_ready[vnet_of(rt_out_msg.mtype)];
      @(posedge clk);
      #1;
      for (int v = 0; v < NVNET; v++) begin
        if (tk1[v]) begin expect_mask[int'(l1_out_msg[v].aux)] = l1_out_msg[v].dst_mask; l1_out_valid[v] = 1'b0; n_inj++; end
        if (tk2[v]) begin expect_mask[int'(l2_out_msg[v].aux)] = l2_out_msg[v].dst_mask; l2_out_valid[v] = 1'b0; n_inj++; end
      end
      if (tkm) begin expect_mask[int'(mem_out_msg.aux)] = mem_out_msg.dst_mask; mem_out_valid = 1'b0; n_inj++; end
      if (tkr) begin
        ejq[int'(rt_out_msg.dst_unit)][vnet_of(rt_out_msg.mtype)].push_back(rt_out_msg);
        rt_out_valid = 1'b0;
      end
    end
    for (int v = 0; v < NVNET; v++) begin l1_in_ready[v] = 1'b1; l2_in_ready[v] = 1'b1; end
    mem_in_ready = 1'b1; rt_in_ready = '1;
    repeat (200) @(posedge clk);
    check(n_inj > 500 && n_ej > 500, "enough traffic");
    begin
      int left;
      left = 0;
      foreach (expect_mask[k]) if (expect_mask[k] != '0) left++;
      check(left == 0, "all multicast copies sent");
      for (int u = 0; u < 3; u++) for (int v = 0; v < NVNET; v++) check(ejq[u][v].size() == 0, "all ejected");
    end
    $display("injected=%0d copies=%0d ejected=%0d", n_inj, n_copies, n_ej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // router side of injection
  always @(posedge clk) if (rst_n) begin
    if (rt_in_valid) begin
      int id;
      id = int'(rt_in_msg.aux);
      check(rt_in_ready[vnet_of(rt_in_msg.mtype)], "sent while class not ready");
      if (rt_in_ready[vnet_of(rt_in_msg.mtype)]) begin
        n_copies++;
        check(expect_mask.exists(id) && expect_mask[id][rt_in_msg.dst], "copy for a requested destination");
        check(int'(rt_in_msg.src) == TILE, "src is this tile");
        if (expect_mask.exists(id)) expect_mask[id][rt_in_msg.dst] = 1'b0;
      end
    end
    for (int v = 0; v < NVNET; v++) begin
      if (l1_in_valid[v] && l1_in_ready[v]) begin
        n_ej++;
        check(ejq[0][v].size() > 0 && l1_in_msg[v] == ejq[0][v][0], "L1 ejection");
        if (ejq[0][v].size() > 0) void'(ejq[0][v].pop_front());
      end
      if (l2_in_valid[v] && l2_in_ready[v]) begin
        n_ej++;
        check(ejq[1][v].size() > 0 && l2_in_msg[v] == ejq[1][v][0], "L2 ejection");
        if (ejq[1][v].size() > 0) void'(ejq[1][v].pop_front());
      end
    end
    if (mem_in_valid && mem_in_ready) begin
      int vv;
      n_ej++;
      vv = int'(vnet_of(mem_in_msg.mtype));
      check(ejq[2][vv].size() > 0 && mem_in_msg == ejq[2][vv][0], "memory ejection");
      if (ejq[2][vv].size() > 0) void'(ejq[2][vv].pop_front());
    end
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
