// tb_noc_router: self-checking test of noc_router at mesh position (1,1).
// Each of the five input ports offers random messages (random destination tile,
// random message class) while each output port's ready is random per virtual
// network. Every message carries a unique id. Checks: a message leaves on the
// port XY routing asks for (local when it has arrived, else along X first,
// then Y), unchanged; no message is lost or duplicated; within one input
// port and message class the order is kept towards any one output; an output
// never sends a message whose virtual network is not ready.
`timescale 1ns/1ps
module tb_noc_router;
  import dnuca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic             in_valid [5];
  msg_t             in_msg   [5];
  logic [NVNET-1:0] in_ready [5];
  logic             out_valid[5];
  msg_t             out_msg  [5];
  logic [NVNET-1:0] out_ready[5];
  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  bit seen[int];
  int last_id[5][NVNET][5];   // input, vnet, output -> last id delivered

  noc_router #(.X(1), .Y(1), .DEPTH(4)) dut (.*);

  localparam mtype_e TYPES[3] = '{M_GETS, M_DATA_S, M_INV};

  function automatic int route(tile_t d);
    if (mesh_x(d) > 1) return 2;
    if (mesh_x(d) < 1) return 4;
    if (mesh_y(d) > 1) return 3;
    if (mesh_y(d) < 1) return 1;
    return 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int nid = 1;
  bit take[5];
  initial begin
    for (int p = 0; p < 5; p++) begin
      in_valid[p] = 1'b0; in_msg[p] = '0; out_ready[p] = '0;
      for (int v = 0; v < NVNET; v++) for (int o = 0; o < 5; o++) last_id[p][v][o] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        // hold an offered message until it is taken
        if (!in_valid[p] && i < 2500 && ($urandom % 100) < 50) begin
          msg_t m;
          m = '0;
          m.mtype = TYPES[$urandom % 3];
          m.dst   = tile_t'($urandom % N_TILES);
          m.src   = tile_t'(p);
          m.data  = line_t'(nid) << 100;
          m.aux   = 16'(nid);
          nid++;
          in_msg[p] = m;
          in_valid[p] = 1'b1;
        end
        out_ready[p] = 3'($urandom);
      end
      #1;
      for (int p = 0; p < 5; p++) take[p] = in_valid[p] && in_ready[p][vnet_of(in_msg[p].mtype)];
      @(posedge clk);
      #1;
      for (int p = 0; p < 5; p++)
        if (take[p]) begin
          sent++;
          in_valid[p] = 1'b0;
        end
    end
    for (int p = 0; p < 5; p++) out_ready[p] = '1;
    repeat (100) @(posedge clk);
    check(sent == got, "messages lost");
    check(sent > 1000, "too few messages");
    $display("sent=%0d delivered=%0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++)
      if (out_valid[o] && out_ready[o][vnet_of(out_msg[o].mtype)]) begin
        int id, p, v;
        id = int'(out_msg[o].aux);
        p  = int'(out_msg[o].src);
        v  = int'(vnet_of(out_msg[o].mtype));
        got++;
        check(route(out_msg[o].dst) == o, "XY route");
        check(!seen.exists(id), "duplicate");
        check(out_msg[o].data == (line_t'(id) << 100), "payload");
        check(id > last_id[p][v][o], "order within a class");
        last_id[p][v][o] = id;
        seen[id] = 1'b1;
      end
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
