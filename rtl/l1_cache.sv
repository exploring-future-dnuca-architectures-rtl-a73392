// l1_cache: private L1 data cache controller of one tile (MESI, DNUCA-aware).
//
// Function. The core issues one load or store of a 32-bit word at a time. A hit
// answers the next cycle. A miss sends GETS (load) or GETX (store) to the block's
// static home L2 bank; a store to a Shared line sends GETX to the bank that holds
// the block. Stable states are I, S, E, M; a line waiting for the L2 is in IS, IM
// or SM. Replacing an E or M line moves it to a one-entry write-back buffer (the
// M_I state) and sends PUTX; the buffer is freed by WB_ACK. S lines are dropped
// silently.
//
// DNUCA additions. Each line keeps "location bits": the L2 bank that supplied it
// (the sender of the data message). Upgrades and write-backs go to that bank, not
// to the home. A migration notification (MIG_NTF) from an L2 bank rewrites the
// location of the line (or of the write-back buffer) and is acknowledged to the
// notifying bank. A RETRY from an L2 bank makes the controller send its request
// again after RETRY_WAIT cycles: a miss goes to the home again, an upgrade and a
// write-back go to the (possibly updated) location. The location bits disappear
// with the line, on replacement or invalidation.
//
// Races handled. An invalidation that reaches a line in IS is acknowledged at
// once; the data, when it comes, serves the pending load and the line is then
// dropped (IS_I behaviour). Forwards to a line in IS/IM/SM wait in their input
// buffer until the data arrives. A forward or invalidation that finds the block
// in the write-back buffer is answered with the buffered data, and the later
// PUTX retry is then dropped. A notification that overtakes the data of the
// pending miss is remembered, so the data's sender does not overwrite the newer
// location.
//
// Interface. core_req_* is a valid/ready request (we = store), core_resp_valid
// pulses once per request with the loaded word (stores return the old word).
// in_* are the three virtual-network input buffers, out_* one outgoing message
// per virtual network (destination mask with one bit): requests and
// write-backs on VNET0, answers to forwards and notifications on VNET1.
//
// MESI states, the transients named in the document, location bits and the
// retry behaviour follow the document; the victim choice (first invalid way,
// else a per-set round-robin pointer), the write-back buffer size, the blocking
// one-miss-at-a-time operation and the retry back-off are this design's choices.
module l1_cache
  import dnuca_pkg::*;
#(
  parameter int unsigned TILE       = 0,
  parameter int unsigned SETS       = 128,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned RETRY_WAIT = 8,
  localparam int unsigned SW        = $clog2(SETS),
  localparam int unsigned WW        = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TW        = BLK_W - SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // core
  input  logic                 core_req_valid,
  output logic                 core_req_ready,
  input  logic                 core_req_we,
  input  logic [ADDR_W-1:0]    core_req_addr,
  input  logic [WORD_BITS-1:0] core_req_wdata,
  output logic                 core_resp_valid,
  output logic [WORD_BITS-1:0] core_resp_rdata,
  // network
  input  logic                 in_valid[NVNET],
  input  msg_t                 in_msg  [NVNET],
  output logic                 in_ready[NVNET],
  output logic                 out_valid[NVNET],
  output msg_t                 out_msg  [NVNET],
  input  logic                 out_ready[NVNET]
);
  typedef enum logic [2:0] {
    L1_I  = 3'd0,
    L1_S  = 3'd1,
    L1_E  = 3'd2,
    L1_M  = 3'd3,
    L1_IS = 3'd4,
    L1_IM = 3'd5,
    L1_SM = 3'd6
  } l1_state_e;

  // ---------------- arrays ----------------
  l1_state_e      st   [SETS][WAYS];
  logic [TW-1:0]  tag  [SETS][WAYS];
  tile_t          loc  [SETS][WAYS];
  line_t          data [SETS][WAYS];
  logic [WW-1:0]  rrptr[SETS];

  // ---------------- current core request ----------------
  logic                   cur_v;
  logic                   cur_we;
  blk_t                   cur_blk;
  logic [$clog2(WORDS)-1:0] cur_word;
  logic [WORD_BITS-1:0]   cur_wdata;
  logic                   cur_wait;      // miss outstanding
  logic [WW-1:0]          cur_way;
  logic                   inv_pend;      // IS_I: drop line after use
  logic                   ntf_v;         // notification overtook data
  tile_t                  ntf_from, ntf_loc;
  logic                   get_resend;
  logic [7:0]             get_timer;

  // ---------------- write-back buffer (M_I) ----------------
  logic   wb_v, wb_given, wb_dirty, wb_resend;
  blk_t   wb_blk;
  line_t  wb_data;
  tile_t  wb_loc;
  logic [7:0] wb_timer;

  // ---------------- outgoing message registers ----------------
  // out_*: requests and write-backs (VNET0); rsp_*: answers to forwards
  // (VNET1). Separate registers keep a blocked request from stopping the
  // answers the directory waits for.
  logic out_v, rsp_v;
  msg_t out_r, rsp_r;
  assign out_valid[0] = out_v;
  assign out_msg[0]   = out_r;
  assign out_valid[1] = rsp_v;
  assign out_msg[1]   = rsp_r;
  assign out_valid[2] = 1'b0;
  assign out_msg[2]   = '0;
  wire out_free = !out_v || out_ready[0];
  wire rsp_free = !rsp_v || out_ready[1];

  function automatic logic [SW-1:0] set_of(blk_t b);
    return b[SW-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(blk_t b);
    return b[BLK_W-1:SW];
  endfunction

  function automatic msg_t mk(mtype_e t, tile_t d, unit_e u, blk_t a);
    msg_t m;
    m          = '0;
    m.mtype    = t;
    m.src      = tile_t'(TILE);
    m.src_unit = UNIT_L1;
    m.dst_unit = u;
    m.dst_mask = tmask_t'(1) << d;
    m.addr     = a;
    m.req      = tile_t'(TILE);
    return m;
  endfunction

  // lookup of a block: hit way among non-I lines
  typedef struct packed {
    logic          hit;
    logic [WW-1:0] way;
  } look_t;

  function automatic look_t lookup(blk_t b);
    look_t r;
    r = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (st[set_of(b)][w] != L1_I && tag[set_of(b)][w] == tag_of(b)) begin
        r.hit = 1'b1;
        r.way = WW'(w);
      end
    return r;
  endfunction

  look_t lk_cur, lk_f;
  always_comb begin
    lk_cur = lookup(cur_blk);
    lk_f   = lookup(in_msg[2].addr);
  end

  // victim for the current miss
  logic          vic_free;
  logic [WW-1:0] vic_way;
  always_comb begin
    vic_free = 1'b0;
    vic_way  = rrptr[set_of(cur_blk)];
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (st[set_of(cur_blk)][w] == L1_I) begin
        vic_free = 1'b1;
        vic_way  = WW'(w);
      end
  end

  // ---------------- action selection ----------------
  typedef enum logic [3:0] {
    A_NONE, A_RESP, A_FWD, A_FWD_STALL, A_CORE, A_GET_RESEND, A_WB_RESEND
  } act_e;
  act_e act;

  wire l2_is_transient_f = lk_f.hit &&
       (st[set_of(in_msg[2].addr)][lk_f.way] inside {L1_IS, L1_IM, L1_SM});
  wire fwd_stall = in_valid[2] && (in_msg[2].mtype inside {M_FWD_GETS, M_FWD_GETX})
                   && l2_is_transient_f && !(wb_v && wb_blk == in_msg[2].addr);

  always_comb begin
    act = A_NONE;
    if (in_valid[1]) act = A_RESP;
    else if (in_valid[2] && !fwd_stall && rsp_free) act = A_FWD;
    else if (wb_v && wb_resend && wb_timer == '0 && out_free) act = A_WB_RESEND;
    else if (cur_v && cur_wait && get_resend && get_timer == '0 && out_free) act = A_GET_RESEND;
    else if (cur_v && !cur_wait && out_free) act = A_CORE;
  end

  always_comb begin
    in_ready[0] = 1'b1;  // the L1 receives no requests
    in_ready[1] = (act == A_RESP);
    in_ready[2] = (act == A_FWD);
  end

  assign core_req_ready = !cur_v;

  // ---------------- sequential behaviour ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        rrptr[s] <= '0;
        for (int w = 0; w < int'(WAYS); w++) begin
          st[s][w]  <= L1_I;
          tag[s][w] <= '0;
          loc[s][w] <= '0;
        end
      end
      cur_v <= 1'b0; cur_we <= 1'b0; cur_blk <= '0; cur_word <= '0; cur_wdata <= '0;
      cur_wait <= 1'b0; cur_way <= '0; inv_pend <= 1'b0;
      ntf_v <= 1'b0; ntf_from <= '0; ntf_loc <= '0;
      get_resend <= 1'b0; get_timer <= '0;
      wb_v <= 1'b0; wb_given <= 1'b0; wb_dirty <= 1'b0; wb_resend <= 1'b0;
      wb_blk <= '0; wb_data <= '0; wb_loc <= '0; wb_timer <= '0;
      out_v <= 1'b0; out_r <= '0;
      rsp_v <= 1'b0; rsp_r <= '0;
      core_resp_valid <= 1'b0; core_resp_rdata <= '0;
    end else begin
      core_resp_valid <= 1'b0;
      if (out_v && out_ready[0]) out_v <= 1'b0;
      if (rsp_v && out_ready[1]) rsp_v <= 1'b0;
      if (get_timer != '0) get_timer <= get_timer - 1'b1;
      if (wb_timer != '0)  wb_timer  <= wb_timer - 1'b1;

      if (core_req_valid && core_req_ready) begin
        cur_v     <= 1'b1;
        cur_we    <= core_req_we;
        cur_blk   <= core_req_addr[ADDR_W-1:OFFSET_BITS];
        cur_word  <= core_req_addr[OFFSET_BITS-1:2];
        cur_wdata <= core_req_wdata;
        cur_wait  <= 1'b0;
      end

      case (act)
        // ---------- responses from the L2 ----------
        A_RESP: begin
          msg_t m;
          m = in_msg[1];
          case (m.mtype)
            M_DATA_S, M_DATA_E: begin
              if (cur_v && cur_wait && m.addr == cur_blk) begin
                line_t d;
                logic [SW-1:0] s;
                s = set_of(cur_blk);
                d = m.data;
                core_resp_rdata <= word_of(d, cur_word);
                core_resp_valid <= 1'b1;
                if (cur_we) d[cur_word*WORD_BITS +: WORD_BITS] = cur_wdata;
                data[s][cur_way] <= d;
                loc[s][cur_way]  <= (ntf_v && ntf_from == m.src) ? ntf_loc : m.src;
                if (inv_pend && m.mtype == M_DATA_S) st[s][cur_way] <= L1_I;
                else if (m.mtype == M_DATA_S)        st[s][cur_way] <= L1_S;
                else if (cur_we)                     st[s][cur_way] <= L1_M;
                else                                 st[s][cur_way] <= L1_E;
                cur_v      <= 1'b0;
                cur_wait   <= 1'b0;
                get_resend <= 1'b0;
                inv_pend   <= 1'b0;
                ntf_v      <= 1'b0;
              end
            end
            M_WB_ACK: begin
              if (wb_v && m.addr == wb_blk) begin
                wb_v      <= 1'b0;
                wb_resend <= 1'b0;
              end
            end
            M_RETRY: begin
              if (m.aux[4:0] == 5'(M_PUTX)) begin
                if (wb_v && m.addr == wb_blk) begin
                  if (wb_given) wb_v <= 1'b0;
                  else begin
                    wb_resend <= 1'b1;
                    wb_timer  <= 8'(RETRY_WAIT);
                  end
                end
              end else if (cur_v && cur_wait && m.addr == cur_blk) begin
                get_resend <= 1'b1;
                get_timer  <= 8'(RETRY_WAIT);
              end
            end
            default: ;
          endcase
        end

        // ---------- forwards, invalidations, notifications ----------
        A_FWD: begin
          msg_t m, r;
          logic [SW-1:0] s;
          l1_state_e ls;
          m  = in_msg[2];
          s  = set_of(m.addr);
          ls = lk_f.hit ? st[s][lk_f.way] : L1_I;
          case (m.mtype)
            M_MIG_NTF: begin
              r = mk(M_NTF_ACK, m.src, UNIT_L2, m.addr);
              if (lk_f.hit) loc[s][lk_f.way] <= tile_t'(m.aux);
              if (wb_v && wb_blk == m.addr) wb_loc <= tile_t'(m.aux);
              if (cur_v && cur_wait && cur_blk == m.addr && ls inside {L1_IS, L1_IM, L1_SM}) begin
                ntf_v    <= 1'b1;
                ntf_from <= m.src;
                ntf_loc  <= tile_t'(m.aux);
              end
            end
            M_INV: begin
              r = mk(M_INV_ACK, m.src, UNIT_L2, m.addr);
              if (wb_v && wb_blk == m.addr) begin
                if (!wb_given) begin
                  r.data   = wb_data;
                  r.dirty  = wb_dirty;
                  r.aux[0] = 1'b1;
                  wb_given <= 1'b1;
                end
              end else begin
                case (ls)
                  L1_S: st[s][lk_f.way] <= L1_I;
                  L1_E, L1_M: begin
                    r.data   = data[s][lk_f.way];
                    r.dirty  = (ls == L1_M);
                    r.aux[0] = 1'b1;
                    st[s][lk_f.way] <= L1_I;
                  end
                  L1_SM: st[s][lk_f.way] <= L1_IM;
                  L1_IS: inv_pend <= 1'b1;
                  default: ;
                endcase
              end
            end
            default: begin  // M_FWD_GETS / M_FWD_GETX
              r = mk(M_FWD_ACK, m.src, UNIT_L2, m.addr);
              if (wb_v && wb_blk == m.addr) begin
                if (!wb_given) begin
                  r.data   = wb_data;
                  r.dirty  = wb_dirty;
                  r.aux[0] = 1'b1;
                  wb_given <= 1'b1;
                end
              end else if (ls inside {L1_E, L1_M}) begin
                r.data   = data[s][lk_f.way];
                r.dirty  = (ls == L1_M);
                r.aux[0] = 1'b1;
                st[s][lk_f.way] <= (m.mtype == M_FWD_GETS) ? L1_S : L1_I;
              end
            end
          endcase
          rsp_v <= 1'b1;
          rsp_r <= r;
        end

        // ---------- resend after RETRY ----------
        A_WB_RESEND: begin
          msg_t r;
          r = mk(M_PUTX, wb_loc, UNIT_L2, wb_blk);
          r.data  = wb_data;
          r.dirty = wb_dirty;
          out_v <= 1'b1;
          out_r <= r;
          wb_resend <= 1'b0;
        end
        A_GET_RESEND: begin
          l1_state_e ls;
          ls = st[set_of(cur_blk)][cur_way];
          out_v <= 1'b1;
          if (ls == L1_SM) out_r <= mk(M_GETX, loc[set_of(cur_blk)][cur_way], UNIT_L2, cur_blk);
          else             out_r <= mk(cur_we ? M_GETX : M_GETS, home_of(cur_blk), UNIT_L2, cur_blk);
          get_resend <= 1'b0;
        end

        // ---------- core request ----------
        A_CORE: begin
          logic [SW-1:0] s;
          s = set_of(cur_blk);
          if (lk_cur.hit) begin
            l1_state_e ls;
            ls = st[s][lk_cur.way];
            if (!cur_we) begin
              core_resp_rdata <= word_of(data[s][lk_cur.way], cur_word);
              core_resp_valid <= 1'b1;
              cur_v <= 1'b0;
            end else if (ls inside {L1_E, L1_M}) begin
              core_resp_rdata <= word_of(data[s][lk_cur.way], cur_word);
              core_resp_valid <= 1'b1;
              data[s][lk_cur.way][cur_word*WORD_BITS +: WORD_BITS] <= cur_wdata;
              st[s][lk_cur.way] <= L1_M;
              cur_v <= 1'b0;
            end else begin  // store to S: upgrade at the bank holding the block
              st[s][lk_cur.way] <= L1_SM;
              cur_way  <= lk_cur.way;
              cur_wait <= 1'b1;
              inv_pend <= 1'b0;
              ntf_v    <= 1'b0;
              out_v <= 1'b1;
              out_r <= mk(M_GETX, loc[s][lk_cur.way], UNIT_L2, cur_blk);
            end
          end else if (wb_v && wb_blk == cur_blk) begin
            // wait for the write-back of the same block to finish
          end else if (!vic_free && st[s][vic_way] inside {L1_E, L1_M}) begin
            if (!wb_v) begin
              msg_t r;
              r = mk(M_PUTX, loc[s][vic_way], UNIT_L2, {tag[s][vic_way], s});
              r.data  = data[s][vic_way];
              r.dirty = (st[s][vic_way] == L1_M);
              wb_v      <= 1'b1;
              wb_given  <= 1'b0;
              wb_resend <= 1'b0;
              wb_blk    <= {tag[s][vic_way], s};
              wb_data   <= data[s][vic_way];
              wb_dirty  <= (st[s][vic_way] == L1_M);
              wb_loc    <= loc[s][vic_way];
              st[s][vic_way] <= L1_I;
              out_v <= 1'b1;
              out_r <= r;
            end
          end else begin
            st[s][vic_way]  <= cur_we ? L1_IM : L1_IS;
            tag[s][vic_way] <= tag_of(cur_blk);
            rrptr[s] <= (vic_way == WW'(WAYS - 1)) ? '0 : vic_way + 1'b1;
            cur_way  <= vic_way;
            cur_wait <= 1'b1;
            inv_pend <= 1'b0;
            ntf_v    <= 1'b0;
            out_v <= 1'b1;
            out_r <= mk(cur_we ? M_GETX : M_GETS, home_of(cur_blk), UNIT_L2, cur_blk);
          end
        end
        default: ;
      endcase
    end
  end

  // the controller never overwrites a message the network has not taken
  assert property (@(posedge clk) disable iff (!rst_n) out_v && !out_ready[0] |=> out_v && $stable(out_r));
  assert property (@(posedge clk) disable iff (!rst_n) rsp_v && !rsp_free |=> rsp_v && $stable(rsp_r));
endmodule
