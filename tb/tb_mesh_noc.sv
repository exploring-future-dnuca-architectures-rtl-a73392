// tb_mesh_noc: self-checking test of the 4x4 mesh_noc. Every tile injects
// random messages (random destination, random message class, unique id) at its
// local port; the local output ports accept with a random ready per virtual
// network. Checks: each message comes out at the local port of its
// destination tile, unchanged and exactly once; messages from one source to
// one destination in one class arrive in order; nothing is lost.
`timescale 1ns/1ps
module tb_mesh_noc;
  import dnuca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic             loc_in_valid [N_TILES];
  msg_t             loc_in_msg   [N_TILES];
  logic [NVNET-1:0] loc_in_ready [N_TILES];
  logic             loc_out_valid[N_TILES];
  msg_t             loc_out_msg  [N_TILES];
  logic [NVNET-1:0] loc_out_ready[N_TILES];
  int checks = 0, failures = 0, sent = 0, got = 0;
  bit seen[int];
  int last_id[N_TILES][N_TILES][NVNET];
  localparam mtype_e TYPES[3] = '{M_GETX, M_DATA_E, M_FWD_GETS};

  mesh_noc #(.DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int nid = 1;
  bit take[N_TILES];
  initial begin
    for (int t = 0; t < N_TILES; t++) begin
      loc_in_valid[t] = 1'b0; loc_in_msg[t] = '0; loc_out_ready[t] = '0;
      for (int d = 0; d < N_TILES; d++) for (int v = 0; v < NVNET; v++) last_id[t][d][v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int t = 0; t < N_TILES; t++) begin
        if (!loc_in_valid[t] && i < 2500 && ($urandom % 100) < 30) begin
          msg_t m;
          m = '0;
          m.mtype = TYPES[$urandom % 3];
          m.src   = tile_t'(t);
          m.dst   = tile_t'($urandom % N_TILES);
          m.aux   = 16'(nid);
          m.data  = line_t'(nid) << 300;
          nid++;
          loc_in_msg[t] = m;
          loc_in_valid[t] = 1'b1;
        end
        loc_out_ready[t] = 3'($urandom) | 3'($urandom);
      end
      #1;
      for (int t = 0; t < N_TILES; t++) take[t] = loc_in_valid[t] && loc_in_ready[t][vnet_of(loc_in_msg[t].mtype)];
      @(posedge clk);
      #1;
      for (int t = 0; t < N_TILES; t++)
        if (take[t]) begin
          sent++;
          loc_in_valid[t] = 1'b0;
        end
    end
    for (int t = 0; t < N_TILES; t++) loc_out_ready[t] = '1;
    repeat (300) @(posedge clk);
    check(sent == got, "messages lost");
    check(sent > 5000, "too few messages");
    $display("sent=%0d delivered=%0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < N_TILES; t++)
      if (loc_out_valid[t] && loc_out_ready[t][vnet_of(loc_out_msg[t].mtype)]) begin
        int id, s, v;
        id = int'(loc_out_msg[t].aux);
        s  = int'(loc_out_msg[t].src);
        v  = int'(vnet_of(loc_out_msg[t].mtype));
        got++;
        check(int'(loc_out_msg[t].dst) == t, "delivered to its destination");
        check(!seen.exists(id), "duplicate");
        check(loc_out_msg[t].data == (line_t'(id) << 300), "payload");
        check(id > last_id[s][t][v], "point-to-point order");
        last_id[s][t][v] = id;
        seen[id] = 1'b1;
      end
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
