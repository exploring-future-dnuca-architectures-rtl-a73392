// tb_llc_bank: self-checking directed test of llc_bank (tile 2, 4 sets x 2
// ways, migration off so that no migration traffic mixes into the checked
// sequence; migration and the broadcast search between banks are exercised in
// the system testbench). The testbench plays the L1s, the other banks and
// memory. Checks, in order: a home miss with a zero smart-broadcast counter
// goes straight to memory; the fill gives exclusive data to the requester; a
// second reader causes a forward to the owner and shared data with the
// owner's dirty copy; a writer causes invalidations to both sharers and, after
// both acknowledgements, exclusive data; a request for a block in a
// transaction gets RETRY; a broadcast search for an absent block gets NACK; a
// broadcast search for a present block is served here (data to the requester,
// HIT to the home); an owner's write-back is acknowledged; a request for a
// block of another home that is not here gets RETRY; a fill into a full set
// writes the dirty victim back to memory.
`timescale 1ns/1ps
module tb_llc_bank;
  import dnuca_pkg::*;
  localparam int TILE = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid[NVNET], in_ready[NVNET], out_valid[NVNET], out_ready[NVNET];
  msg_t in_msg[NVNET], out_msg[NVNET];
  logic ev_bcast, ev_mig_start, ev_mig_done, ev_mig_abort, ev_retry, ev_mem_fetch;
  int checks = 0, failures = 0;

  llc_bank #(.TILE(TILE), .SETS(4), .WAYS(2), .NMSHR(4), .MIGRATE(1'b0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic line_t pat(int k);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*WORD_BITS +: WORD_BITS] = 32'(k * 256 + w);
    return l;
  endfunction
  function automatic tmask_t one(int t);
    return tmask_t'(1) << t;
  endfunction

  task automatic expect_out(input int v, input mtype_e t, input tmask_t dm, output msg_t m, input string what);
    int n;
    n = 0;
    while (!out_valid[v] && n < 200) begin @(posedge clk); #1; n++; end
    m = out_msg[v];
    check(out_valid[v] && m.mtype == t && m.dst_mask == dm, what);
    if (!(out_valid[v] && m.mtype == t && m.dst_mask == dm))
      $display("  got %s mask %h", m.mtype.name(), m.dst_mask);
    @(negedge clk); out_ready[v] = 1'b1;
    @(posedge clk); #1 out_ready[v] = 1'b0;
  endtask
  task automatic send(input int v, input mtype_e t, input int src, input unit_e su, input blk_t b,
                      input line_t d, input logic dirty, input logic [15:0] aux, input int req = 0);
    msg_t m;
    m = '0; m.mtype = t; m.src = tile_t'(src); m.src_unit = su; m.dst = tile_t'(TILE);
    m.dst_unit = UNIT_L2; m.addr = b; m.data = d; m.dirty = dirty; m.aux = aux; m.req = tile_t'(req);
    @(negedge clk);
    in_msg[v] = m; in_valid[v] = 1'b1;
    do @(posedge clk); while (!in_ready[v]);
    #1 in_valid[v] = 1'b0;
  endtask

  localparam blk_t A = 26'h012;   // home 2, set 1
  localparam blk_t B = 26'h052;   // home 2, set 1
  localparam blk_t C = 26'h092;   // home 2, set 1
  localparam blk_t X = 26'h014;   // home 4, set 1
  localparam blk_t Y = 26'h019;   // home 9, set 1
  msg_t m;
  initial begin
    for (int v = 0; v < NVNET; v++) begin in_valid[v] = 1'b0; in_msg[v] = '0; out_ready[v] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // home miss -> memory
    send(0, M_GETS, 5, UNIT_L1, A, '0, 1'b0, '0);
    expect_out(0, M_MEM_RD, one(0), m, "memory read for a home miss");
    check(m.addr == A && m.dst_unit == UNIT_MEM, "memory read address");
    send(1, M_MEM_DATA, 0, UNIT_MEM, A, pat(1), 1'b0, '0);
    expect_out(1, M_DATA_E, one(5), m, "exclusive data after fill");
    check(m.data == pat(1), "fill data");
    // second reader: forward to owner 5
    send(0, M_GETS, 6, UNIT_L1, A, '0, 1'b0, '0);
    expect_out(2, M_FWD_GETS, one(5), m, "forward to owner");
    send(1, M_FWD_ACK, 5, UNIT_L1, A, pat(2), 1'b1, 16'h1);
    expect_out(1, M_DATA_S, one(6), m, "shared data to reader");
    check(m.data == pat(2), "owner's dirty data forwarded");
    // writer: invalidate 5 and 6
    send(0, M_GETX, 7, UNIT_L1, A, '0, 1'b0, '0);
    expect_out(2, M_INV, one(5) | one(6), m, "invalidations to sharers");
    send(0, M_GETS, 8, UNIT_L1, A, '0, 1'b0, '0);
    expect_out(1, M_RETRY, one(8), m, "RETRY while block is in a transaction");
    check(m.aux[4:0] == 5'(M_GETS), "RETRY names the request");
    send(1, M_INV_ACK, 5, UNIT_L1, A, '0, 1'b0, '0);
    check(!out_valid[1], "no data before all acknowledgements");
    send(1, M_INV_ACK, 6, UNIT_L1, A, '0, 1'b0, '0);
    expect_out(1, M_DATA_E, one(7), m, "exclusive data to writer");
    check(m.data == pat(2), "writer gets current data");
    // broadcast searches from home 4
    send(0, M_BCAST, 4, UNIT_L2, X, '0, 1'b0, '0, 9);
    expect_out(1, M_BC_NACK, one(4), m, "NACK for an absent block");
    // owner 7 writes A back, dirty
    send(0, M_PUTX, 7, UNIT_L1, A, pat(3), 1'b1, '0);
    expect_out(1, M_WB_ACK, one(7), m, "write-back acknowledged");
    // request for a foreign-home block that is not here
    send(0, M_GETS, 9, UNIT_L1, Y, '0, 1'b0, '0);
    expect_out(1, M_RETRY, one(9), m, "RETRY for a stale location");
    // fill B, then C into the full set: dirty A (LRU, state M) goes to memory
    send(0, M_GETS, 5, UNIT_L1, B, '0, 1'b0, '0);
    expect_out(0, M_MEM_RD, one(0), m, "memory read B");
    send(1, M_MEM_DATA, 0, UNIT_MEM, B, pat(4), 1'b0, '0);
    expect_out(1, M_DATA_E, one(5), m, "data B");
    send(0, M_GETS, 6, UNIT_L1, C, '0, 1'b0, '0);
    expect_out(1, M_MEM_WB, one(0), m, "dirty victim written back");
    check(m.addr == A && m.data == pat(3), "write-back address and data");
    expect_out(0, M_MEM_RD, one(0), m, "memory read C");
    send(1, M_MEM_DATA, 0, UNIT_MEM, C, pat(5), 1'b0, '0);
    expect_out(1, M_DATA_E, one(6), m, "data C");
    // a broadcast for C (present, owner 6) from home 4 acting for requester 9:
    // this bank forwards to the owner and answers HIT once served
    send(0, M_BCAST, 4, UNIT_L2, C, '0, 1'b0, '0, 9);
    expect_out(2, M_FWD_GETS, one(6), m, "broadcast hit forwards to the owner");
    send(1, M_FWD_ACK, 6, UNIT_L1, C, pat(6), 1'b1, 16'h1);
    expect_out(1, M_BC_HIT, one(4), m, "HIT to the home bank");
    expect_out(1, M_DATA_S, one(9), m, "broadcast hit serves the requester");
    check(m.data == pat(6), "requester gets the owner's data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
