// tb_l1_cache: self-checking directed test of l1_cache (tile 3, 4 sets x 2
// ways, retry wait 4). The testbench plays the L2 banks. It checks, in order:
// a load miss sends GETS to the home bank; a RETRY makes the L1 resend it; the
// data (sent by another bank, as after a migration) completes the load and
// the returned word; the L1 location bits then point at the bank that sent
// the data; a store to an E line completes silently (E -> M); a migration
// notification is acknowledged to its sender and moves the location bits; a
// forward GETS is answered with the dirty line and leaves the line shared;
// a store to the shared line sends the upgrade GETX to the bank in the
// location bits; an invalidation of the M line returns the dirty data; a
// conflict miss on a dirty line sends PUTX with its data to the bank holding
// the block, and the WB_ACK frees the write-back buffer.
`timescale 1ns/1ps
module tb_l1_cache;
  import dnuca_pkg::*;
  localparam int TILE = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic core_req_valid = 1'b0, core_req_ready, core_req_we = 1'b0;
  logic [ADDR_W-1:0] core_req_addr = '0;
  logic [WORD_BITS-1:0] core_req_wdata = '0, core_resp_rdata;
  logic core_resp_valid;
  logic in_valid[NVNET], in_ready[NVNET], out_valid[NVNET], out_ready[NVNET];
  msg_t in_msg[NVNET], out_msg[NVNET];
  int checks = 0, failures = 0;

  l1_cache #(.TILE(TILE), .SETS(4), .WAYS(2), .RETRY_WAIT(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic line_t pat(int k);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*WORD_BITS +: WORD_BITS] = 32'(k * 256 + w);
    return l;
  endfunction

  // start a core request (does not wait for the answer)
  task automatic core_start(input bit we, input blk_t b, input int w, input logic [31:0] d);
    @(negedge clk);
    core_req_valid = 1'b1; core_req_we = we;
    core_req_addr = {b, 6'(w * 4)}; core_req_wdata = d;
    do @(posedge clk); while (!core_req_ready);
    #1 core_req_valid = 1'b0;
  endtask
  task automatic core_wait(input logic [31:0] exp, input string what);
    int n;
    n = 0;
    while (!core_resp_valid && n < 200) begin @(posedge clk); #1; n++; end
    check(core_resp_valid && core_resp_rdata == exp, what);
    @(posedge clk); #1;
  endtask
  // wait for a message on one output and take it
  task automatic expect_out(input int v, input mtype_e t, input tile_t dst, output msg_t m, input string what);
    int n;
    n = 0;
    while (!out_valid[v] && n < 200) begin @(posedge clk); #1; n++; end
    m = out_msg[v];
    check(out_valid[v] && m.mtype == t && m.dst_mask == (tmask_t'(1) << dst) && m.src == tile_t'(TILE), what);
    @(negedge clk); out_ready[v] = 1'b1;
    @(posedge clk); #1 out_ready[v] = 1'b0;
  endtask
  task automatic send(input int v, input mtype_e t, input tile_t src, input blk_t b,
                      input line_t d, input logic [15:0] aux);
    msg_t m;
    m = '0; m.mtype = t; m.src = src; m.src_unit = UNIT_L2; m.dst = tile_t'(TILE);
    m.dst_unit = UNIT_L1; m.addr = b; m.data = d; m.aux = aux;
    @(negedge clk);
    in_msg[v] = m; in_valid[v] = 1'b1;
    do @(posedge clk); while (!in_ready[v]);
    #1 in_valid[v] = 1'b0;
  endtask

  localparam blk_t A = 26'h102;   // home bank 2, L1 set 2
  localparam blk_t B = 26'h116;   // home bank 6, L1 set 2
  localparam blk_t C = 26'h12a;   // home bank 10, L1 set 2
  msg_t m;
  initial begin
    for (int v = 0; v < NVNET; v++) begin in_valid[v] = 1'b0; in_msg[v] = '0; out_ready[v] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // load miss, RETRY, resend, data from bank 7
    core_start(1'b0, A, 5, '0);
    expect_out(0, M_GETS, 2, m, "GETS to home bank");
    send(1, M_RETRY, 2, A, '0, 16'(M_GETS));
    expect_out(0, M_GETS, 2, m, "GETS resent after RETRY");
    send(1, M_DATA_E, 7, A, pat(1), '0);
    core_wait(32'(256 + 5), "load data");
    check(dut.loc[2][dut.cur_way] == 4'd7, "location bits set to the bank that sent data");
    // silent E -> M store, then load it back
    core_start(1'b1, A, 5, 32'hCAFE0005);
    core_wait(32'(256 + 5), "store to E returns old word");
    check(!out_valid[0] && !out_valid[1], "E -> M store is silent");
    core_start(1'b0, A, 5, '0);
    core_wait(32'hCAFE0005, "load after store");
    // migration notification from bank 7: block now in bank 9
    send(2, M_MIG_NTF, 7, A, '0, 16'd9);
    expect_out(1, M_NTF_ACK, 7, m, "notification acknowledged");
    // forward GETS from bank 9: dirty data, line becomes S
    send(2, M_FWD_GETS, 9, A, '0, '0);
    expect_out(1, M_FWD_ACK, 9, m, "forward answered");
    check(m.aux[0] && m.dirty && m.data[5*32 +: 32] == 32'hCAFE0005, "forward carries dirty data");
    // store to S: upgrade goes to bank 9 (location bits)
    core_start(1'b1, A, 6, 32'hBEEF0006);
    expect_out(0, M_GETX, 9, m, "upgrade GETX to the migrated location");
    begin
      line_t d;
      d = pat(1);
      d[5*32 +: 32] = 32'hCAFE0005;
      send(1, M_DATA_E, 9, A, d, '0);
    end
    core_wait(32'(256 + 6), "upgrade completes");
    // invalidation of the M line returns dirty data
    send(2, M_INV, 9, A, '0, '0);
    expect_out(1, M_INV_ACK, 9, m, "invalidation acknowledged");
    check(m.aux[0] && m.dirty && m.data[6*32 +: 32] == 32'hBEEF0006, "invalidation returns dirty data");
    // fill set 2 with B (E) and C (M), then A again: dirty victim
    core_start(1'b0, B, 0, '0);
    expect_out(0, M_GETS, 6, m, "GETS B");
    send(1, M_DATA_E, 6, B, pat(2), '0);
    core_wait(32'(512), "load B");
    core_start(1'b1, C, 1, 32'h12345678);
    expect_out(0, M_GETX, 10, m, "GETX C");
    send(1, M_DATA_E, 10, C, pat(3), '0);
    core_wait(32'(768 + 1), "store C");
    core_start(1'b0, A, 0, '0);
    expect_out(0, M_PUTX, 6, m, "victim write-back to its bank");
    check(m.addr == B && m.data == pat(2), "write-back data");
    send(1, M_WB_ACK, 6, B, '0, '0);
    expect_out(0, M_GETS, 2, m, "miss after write-back goes to home");
    send(1, M_DATA_S, 2, A, pat(4), '0);
    core_wait(32'(1024), "load A shared");
    check(!dut.wb_v, "write-back buffer freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
