// llc_bank: one bank of the shared last-level cache (L2) with its directory and
// the DNUCA mechanisms: broadcast search, smart broadcast, block migration.
//
// Directory and stable states. Every line has a tag, an L2 state, a dirty bit, a
// sharer vector (one bit per L1) and an owner. NP: not present. SS: valid, read
// only copies in the L1s named by the sharer vector. M: valid here, in no L1. MT:
// one L1 owns the block (E or M there); requests are forwarded to it. A way that
// is allocated and waits for its data is marked RSV.
//
// Transactions are tracked in NMSHR miss-status registers (MSHRs). While an MSHR
// holds a block, L1 requests for it get RETRY and broadcast searches get BUSY, so
// every block is handled by one transaction at a time.
//
//  * L1 GETS/GETX that hits: M -> exclusive data, MT owner. SS + GETS -> shared
//    data, add sharer. SS + GETX -> invalidate the other sharers, collect the
//    acknowledgements, then exclusive data. MT -> forward to the owner (VNET2),
//    take its data back, then answer.
//  * A miss in the home bank: if the smart-broadcast counter of the set is zero
//    the line is fetched from memory at once. Otherwise a search (BCAST) goes to
//    all other banks; each answers HIT (it had the block and served the L1
//    itself), NACK (not here) or BUSY (block in a transaction). All NACK -> memory
//    fetch; any HIT -> done; BUSY without HIT -> RETRY to the L1. A miss in a
//    bank that is not the home (stale L1 location) gets RETRY.
//  * Memory fetch: a way is taken (an NP way, else the least recently used M way,
//    written back if dirty); the fill makes the line MT with exclusive data to
//    the requester. When only lines with L1 copies remain, the LRU one is
//    evicted first (invalidations / forward to owner) and the requester retries.
//  * Migration (sender): on each L1 request the migration policy may trigger
//    for the request's set; the LRU stable block of that set is then offered to
//    a receiver bank (MIG_REQ, state XmigD). On ACK the sharers or the owner are
//    told the new location (MigSh) and their acknowledgements collected; then the
//    block, its state and its directory go to the receiver (MigI) and the line
//    is freed here; MIG_DONE ends the migration (NP).
//  * Migration (receiver): a MIG_REQ is refused (ABORT) when a migration already
//    uses the set in this bank, when the policy's acceptance test fails, or when
//    no way can be freed without L1 invalidations. Otherwise a way is allocated
//    (MigIS^D) and ACK returned; the block arrives, takes the sender's state and
//    MIG_DONE goes back.
//  * Smart broadcast bookkeeping: the home bank counts per set the blocks
//    migrated away from it; a block evicted in a foreign bank sends SB_DEC to
//    its home, and a block migrating back home decrements directly.
//
// Interface. in_* are the three virtual-network input buffers (requests,
// responses, forwards; the bank takes no forwards). out_* are three output
// queues, one per virtual network, each message with a destination mask. The
// bank handles one input message per step (up to 4 outputs); a step starts only
// when the queues it may write have room. Priority: responses, then deferred
// memory reads, then requests, then a pending migration start. Responses and
// requests never wait for VNET0 room (memory reads are deferred, an L1 miss
// meeting a full VNET0 queue is retried), which keeps the protocol free of
// circular waits between the message classes. Array reads are combinational,
// updates take effect at the clock edge.
//
// From the document: L2 states NP/SS/M/MT, home-bank broadcast with HIT/NACK
// collection and memory fetch after all NACKs, request serialisation in the home,
// the per-set smart-broadcast counter, the migration states XmigD, MigSh, MigI
// and MigIS^D with their messages, one migration per set, RETRY for requests
// that meet a migrating block, migration of the LRU block of the congested set.
// This design's choices: BUSY answers to searches, RETRY (instead of waiting) for
// a request that meets any busy block, exclusive grant on memory fills,
// eviction with retry, the receiver choice (requester's tile, else next tile),
// MSHR count, LRU ages, the output queues, memory write-backs on VNET1.
module llc_bank
  import dnuca_pkg::*;
#(
  parameter int unsigned TILE        = 0,
  parameter int unsigned SETS        = 512,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned NMSHR       = 8,
  parameter int unsigned LEVEL       = 1,
  parameter bit          USE_RX_COND = 1'b0,
  parameter bit          SMART_BCAST = 1'b1,
  parameter bit          MIGRATE     = 1'b1,
  parameter int unsigned MEM_TILE    = 0,
  localparam int unsigned SW         = $clog2(SETS),
  localparam int unsigned WW         = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned MW         = (NMSHR > 1) ? $clog2(NMSHR) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid[NVNET],
  input  msg_t in_msg  [NVNET],
  output logic in_ready[NVNET],
  output logic out_valid[NVNET],
  output msg_t out_msg  [NVNET],
  input  logic out_ready[NVNET],
  // event pulses for statistics
  output logic ev_bcast,       // a broadcast search started
  output logic ev_mig_start,   // a migration request was sent
  output logic ev_mig_done,    // a migration completed (sender side)
  output logic ev_mig_abort,   // a migration was refused
  output logic ev_retry,       // a RETRY was sent to an L1
  output logic ev_mem_fetch    // a line was requested from memory
);
  typedef enum logic [3:0] {
    MS_FREE, MS_BCAST, MS_MEM, MS_INV, MS_FWD, MS_EVICT,
    MS_XMIGD, MS_MIGSH, MS_MIGI, MS_MIGISD
  } ms_e;

  typedef struct packed {
    ms_e           kind;
    blk_t          addr;
    logic [WW-1:0] way;
    tile_t         req;
    logic          excl;
    logic [4:0]    cnt;
    logic          hit;
    logic          busy;
    tile_t         peer;   // migration partner
    logic          pend;   // MS_MEM: memory read not sent yet
  } mshr_t;

  localparam int unsigned TGW = BLK_W - SW;

  // ---------------- arrays ----------------
  l2_state_e      st    [SETS][WAYS];
  logic [TGW-1:0] tag   [SETS][WAYS];
  logic           dirty [SETS][WAYS];
  tmask_t         shr   [SETS][WAYS];
  tile_t          own   [SETS][WAYS];
  line_t          data  [SETS][WAYS];
  logic [WW-1:0]  age   [SETS][WAYS];
  mshr_t          ms    [NMSHR];

  function automatic logic [SW-1:0] set_of(blk_t b);
    return b[TILE_BITS +: SW];
  endfunction
  function automatic logic [TGW-1:0] tag_of(blk_t b);
    return {b[BLK_W-1:TILE_BITS+SW], b[TILE_BITS-1:0]};
  endfunction
  function automatic blk_t blk_of(logic [TGW-1:0] t, logic [SW-1:0] s);
    return {t[TGW-1:TILE_BITS], s, t[TILE_BITS-1:0]};
  endfunction
  function automatic logic [4:0] popc(tmask_t m);
    logic [4:0] c;
    c = '0;
    for (int i = 0; i < int'(N_TILES); i++) c = c + 5'(m[i]);
    return c;
  endfunction
  function automatic logic is_mig(ms_e k);
    return k inside {MS_XMIGD, MS_MIGSH, MS_MIGI, MS_MIGISD};
  endfunction

  // ---------------- output queues, one per virtual network ----------------
  // A step emits at most OL messages; it is started only when every queue it
  // may write has OL free entries. Response steps and request steps never
  // wait for VNET0 room (a response never emits on VNET0; an L1 miss that
  // would need a broadcast is retried when the VNET0 queue is full), so a
  // blocked request queue never stops the bank from consuming messages.
  localparam int unsigned OL = 4;
  localparam int unsigned OQ = 8;
  msg_t       oq  [NVNET][OQ];
  logic [3:0] oq_n[NVNET];
  logic [2:0] oq_h[NVNET];
  logic       room[NVNET];
  always_comb
    for (int v = 0; v < NVNET; v++) begin
      out_valid[v] = (oq_n[v] != '0);
      out_msg[v]   = oq[v][oq_h[v]];
      room[v]      = (oq_n[v] <= 4'(OQ - OL));
    end

  function automatic msg_t mk(mtype_e t, tmask_t dm, unit_e u, blk_t a);
    msg_t m;
    m          = '0;
    m.mtype    = t;
    m.src      = tile_t'(TILE);
    m.src_unit = UNIT_L2;
    m.dst_unit = u;
    m.dst_mask = dm;
    m.addr     = a;
    return m;
  endfunction
  function automatic tmask_t one(tile_t t);
    return tmask_t'(1) << t;
  endfunction

  // ---------------- pending migration start ----------------
  logic          mp_v;
  logic [SW-1:0] mp_set;
  tile_t         mp_rx;

  // ---------------- step selection ----------------
  // a memory read decided in a response step is sent by a later step
  logic          p_v;
  logic [MW-1:0] p_idx;
  always_comb begin
    p_v = 1'b0;
    p_idx = '0;
    for (int i = NMSHR - 1; i >= 0; i--)
      if (ms[i].kind == MS_MEM && ms[i].pend) begin
        p_v = 1'b1;
        p_idx = MW'(i);
      end
  end

  typedef enum logic [2:0] { S_NONE, S_RESP, S_MEMRD, S_REQ, S_MIG } step_e;
  step_e step;
  always_comb begin
    step = S_NONE;
    if (in_valid[1] && room[1] && room[2])                step = S_RESP;
    else if (p_v && room[0])                              step = S_MEMRD;
    else if (in_valid[0] && room[1] && room[2])           step = S_REQ;
    else if (mp_v && room[0])                             step = S_MIG;
  end
  always_comb begin
    in_ready[0] = (step == S_REQ);
    in_ready[1] = (step == S_RESP);
    in_ready[2] = 1'b1;
  end

  msg_t cm;
  logic [SW-1:0] cs;
  always_comb begin
    cm = (step == S_RESP) ? in_msg[1] : in_msg[0];
    cs = (step == S_MIG) ? mp_set : set_of(cm.addr);
  end

  // ---------------- lookups for the current step ----------------
  logic          hit;
  logic [WW-1:0] hway;
  logic          m_hit, m_free, set_mig;
  logic [MW-1:0] m_idx, f_idx;
  logic          v_np, v_m, v_ev, v_mig;
  logic [WW-1:0] w_np, w_m, w_ev, w_mig;

  function automatic logic busy_blk(blk_t b);
    logic r;
    r = 1'b0;
    for (int i = 0; i < int'(NMSHR); i++)
      if (ms[i].kind != MS_FREE && ms[i].addr == b) r = 1'b1;
    return r;
  endfunction

  always_comb begin
    hit = 1'b0; hway = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (st[cs][w] inside {L2_SS, L2_M, L2_MT, L2_RSV} && tag[cs][w] == tag_of(cm.addr)) begin
        hit = 1'b1; hway = WW'(w);
      end
    m_hit = 1'b0; m_idx = '0; m_free = 1'b0; f_idx = '0; set_mig = 1'b0;
    for (int i = 0; i < int'(NMSHR); i++) begin
      if (ms[i].kind != MS_FREE && ms[i].addr == cm.addr) begin m_hit = 1'b1; m_idx = MW'(i); end
      if (ms[i].kind != MS_FREE && is_mig(ms[i].kind) && set_of(ms[i].addr) == cs) set_mig = 1'b1;
    end
    for (int i = int'(NMSHR) - 1; i >= 0; i--)
      if (ms[i].kind == MS_FREE) begin m_free = 1'b1; f_idx = MW'(i); end
    // victims: NP way; oldest idle M way; oldest idle way with L1 copies;
    // oldest idle stable way (migration candidate)
    v_np = 1'b0; w_np = '0; v_m = 1'b0; w_m = '0; v_ev = 1'b0; w_ev = '0; v_mig = 1'b0; w_mig = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      logic idle_w;
      idle_w = !busy_blk(blk_of(tag[cs][w], cs));
      if (st[cs][w] == L2_NP) begin v_np = 1'b1; w_np = WW'(w); end
      if (st[cs][w] == L2_M && idle_w && (!v_m || age[cs][w] > age[cs][w_m])) begin
        v_m = 1'b1; w_m = WW'(w);
      end
      if (st[cs][w] inside {L2_SS, L2_MT} && idle_w && (!v_ev || age[cs][w] > age[cs][w_ev])) begin
        v_ev = 1'b1; w_ev = WW'(w);
      end
      if (st[cs][w] inside {L2_SS, L2_M, L2_MT} && idle_w && (!v_mig || age[cs][w] > age[cs][w_mig])) begin
        v_mig = 1'b1; w_mig = WW'(w);
      end
    end
  end

  // ---------------- policy and smart broadcast ----------------
  metric_t       q_metric;
  logic          q_trigger, q_rx_ok;
  logic          pu_v, pu_acc, pu_rep;
  logic [SW-1:0] pu_set;
  logic          sb_nz;
  logic [7:0]    sb_cnt;  // not used by the controller, kept for debug visibility
  logic          sb_inc, sb_dec;
  logic [SW-1:0] sb_inc_set, sb_dec_set;

  migration_policy #(.SETS(SETS), .LEVEL(LEVEL), .USE_RX_COND(USE_RX_COND)) u_policy (
    .clk, .rst_n,
    .q_set(cs), .q_sender_metric(metric_t'(cm.aux)),
    .q_metric, .q_trigger, .q_rx_ok,
    .upd_valid(pu_v), .upd_set(pu_set), .upd_acc(pu_acc), .upd_rep(pu_rep)
  );

  smart_bcast_table #(.SETS(SETS)) u_sb (
    .clk, .rst_n,
    .rd_set(cs), .rd_nonzero(sb_nz), .rd_count(sb_cnt),
    .inc(sb_inc), .inc_set(sb_inc_set), .dec(sb_dec), .dec_set(sb_dec_set)
  );

  // ---------------- the step ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++)
        for (int w = 0; w < int'(WAYS); w++) begin
          st[s][w]    <= L2_NP;
          tag[s][w]   <= '0;
          dirty[s][w] <= 1'b0;
          shr[s][w]   <= '0;
          own[s][w]   <= '0;
          age[s][w]   <= WW'(w);
        end
      for (int i = 0; i < int'(NMSHR); i++) ms[i] <= '0;
      for (int v = 0; v < NVNET; v++) begin
        for (int i = 0; i < int'(OQ); i++) oq[v][i] <= '0;
        oq_n[v] <= '0; oq_h[v] <= '0;
      end
      mp_v <= 1'b0; mp_set <= '0; mp_rx <= '0;
      pu_v <= 1'b0; pu_acc <= 1'b0; pu_rep <= 1'b0; pu_set <= '0;
      sb_inc <= 1'b0; sb_dec <= 1'b0; sb_inc_set <= '0; sb_dec_set <= '0;
      ev_bcast <= 1'b0; ev_mig_start <= 1'b0; ev_mig_done <= 1'b0;
      ev_mig_abort <= 1'b0; ev_retry <= 1'b0; ev_mem_fetch <= 1'b0;
    end else begin
      // local copies of what one step may change
      msg_t       o [OL];
      int         no;
      mshr_t      e;
      logic [WW-1:0] w;

      no = 0;
      for (int i = 0; i < int'(OL); i++) o[i] = '0;
      pu_v <= 1'b0; pu_acc <= 1'b0; pu_rep <= 1'b0; pu_set <= cs;
      sb_inc <= 1'b0; sb_dec <= 1'b0;
      ev_bcast <= 1'b0; ev_mig_start <= 1'b0; ev_mig_done <= 1'b0;
      ev_mig_abort <= 1'b0; ev_retry <= 1'b0; ev_mem_fetch <= 1'b0;

      e = ms[m_idx];
      w = hway;

      case (step)
        // ================= requests (VNET0) =================
        S_REQ: begin
          case (cm.mtype)
            M_GETS, M_GETX, M_BCAST: begin
              logic from_l1;
              logic served;
              from_l1 = (cm.mtype != M_BCAST);
              served  = 1'b0;
              // a miss that may need a broadcast while the request queue is
              // full is retried, so that requests never wait on VNET0 space
              if (m_hit || (hit && st[cs][hway] == L2_RSV) || (from_l1 && !hit && !room[0])) begin
                if (from_l1) begin
                  o[no] = mk(M_RETRY, one(cm.src), UNIT_L1, cm.addr);
                  o[no].aux = 16'(cm.mtype); no++;
                  ev_retry <= 1'b1;
                end else begin
                  o[no] = mk(M_BC_BUSY, one(cm.src), UNIT_L2, cm.addr); no++;
                end
              end else if (hit) begin
                // ---- serve the request in this bank ----
                tile_t r;
                logic  x;
                r = from_l1 ? cm.src : cm.req;
                x = from_l1 ? (cm.mtype == M_GETX) : cm.excl;
                case (st[cs][w])
                  L2_M: begin
                    o[no] = mk(M_DATA_E, one(r), UNIT_L1, cm.addr);
                    o[no].data = data[cs][w]; no++;
                    st[cs][w]  <= L2_MT;
                    own[cs][w] <= r;
                    shr[cs][w] <= '0;
                    served = 1'b1;
                  end
                  L2_SS: begin
                    tmask_t others;
                    others = shr[cs][w] & ~one(r);
                    if (!x) begin
                      o[no] = mk(M_DATA_S, one(r), UNIT_L1, cm.addr);
                      o[no].data = data[cs][w]; no++;
                      shr[cs][w] <= shr[cs][w] | one(r);
                      served = 1'b1;
                    end else if (others == '0) begin
                      o[no] = mk(M_DATA_E, one(r), UNIT_L1, cm.addr);
                      o[no].data = data[cs][w]; no++;
                      st[cs][w]  <= L2_MT;
                      own[cs][w] <= r;
                      shr[cs][w] <= '0;
                      served = 1'b1;
                    end else if (m_free) begin
                      o[no] = mk(M_INV, others, UNIT_L1, cm.addr); no++;
                      ms[f_idx] <= '{kind: MS_INV, addr: cm.addr, way: w, req: r, excl: 1'b1,
                                     cnt: popc(others), hit: 1'b0, busy: 1'b0, peer: '0, pend: 1'b0};
                      served = 1'b1;
                    end
                  end
                  default: begin  // L2_MT
                    if (m_free) begin
                      o[no] = mk(x ? M_FWD_GETX : M_FWD_GETS, one(own[cs][w]), UNIT_L1, cm.addr);
                      o[no].req = r; no++;
                      ms[f_idx] <= '{kind: MS_FWD, addr: cm.addr, way: w, req: r, excl: x,
                                     cnt: 5'd1, hit: 1'b0, busy: 1'b0, peer: '0, pend: 1'b0};
                      served = 1'b1;
                    end
                  end
                endcase
                if (served) begin
                  for (int v = 0; v < int'(WAYS); v++)
                    if (age[cs][v] < age[cs][w]) age[cs][v] <= age[cs][v] + 1'b1;
                  age[cs][w] <= '0;
                  pu_v <= 1'b1; pu_acc <= 1'b1;
                  if (!from_l1) begin
                    o[no] = mk(M_BC_HIT, one(cm.src), UNIT_L2, cm.addr); no++;
                  end
                end else if (from_l1) begin
                  o[no] = mk(M_RETRY, one(cm.src), UNIT_L1, cm.addr);
                  o[no].aux = 16'(cm.mtype); no++;
                  ev_retry <= 1'b1;
                end else begin
                  o[no] = mk(M_BC_BUSY, one(cm.src), UNIT_L2, cm.addr); no++;
                end
              end else if (!from_l1) begin
                o[no] = mk(M_BC_NACK, one(cm.src), UNIT_L2, cm.addr); no++;
              end else if (home_of(cm.addr) != tile_t'(TILE) || !m_free) begin
                o[no] = mk(M_RETRY, one(cm.src), UNIT_L1, cm.addr);
                o[no].aux = 16'(cm.mtype); no++;
                ev_retry <= 1'b1;
              end else if (!SMART_BCAST || sb_nz) begin
                // ---- search the other banks ----
                o[no] = mk(M_BCAST, ~one(tile_t'(TILE)), UNIT_L2, cm.addr);
                o[no].req = cm.src; o[no].excl = (cm.mtype == M_GETX); no++;
                ms[f_idx] <= '{kind: MS_BCAST, addr: cm.addr, way: '0, req: cm.src,
                               excl: (cm.mtype == M_GETX), cnt: 5'(N_TILES - 1),
                               hit: 1'b0, busy: 1'b0, peer: '0, pend: 1'b0};
                pu_v <= 1'b1; pu_acc <= 1'b1;
                ev_bcast <= 1'b1;
              end else begin
                // ---- fetch from memory ----
                mem_fetch(cm.addr, cm.src, cm.mtype == M_GETX, f_idx, o, no);
                pu_v <= 1'b1; pu_acc <= 1'b1;
              end
              // migration policy: the request's set is congested
              if (from_l1 && MIGRATE && q_trigger && !mp_v)  begin
                mp_v   <= 1'b1;
                mp_set <= cs;
                mp_rx  <= (cm.src != tile_t'(TILE)) ? cm.src : tile_t'(TILE + 1);
              end
            end

            M_PUTX: begin
              if (m_hit || !hit || st[cs][hway] == L2_RSV) begin
                o[no] = mk(M_RETRY, one(cm.src), UNIT_L1, cm.addr);
                o[no].aux = 16'(M_PUTX); no++;
                ev_retry <= 1'b1;
              end else begin
                if (st[cs][w] == L2_MT && own[cs][w] == cm.src) begin
                  data[cs][w]  <= cm.data;
                  dirty[cs][w] <= dirty[cs][w] | cm.dirty;
                  st[cs][w]    <= L2_M;
                end
                o[no] = mk(M_WB_ACK, one(cm.src), UNIT_L1, cm.addr); no++;
              end
            end

            M_MIG_REQ: begin
              // receiver: accept or refuse a migration
              logic [WW-1:0] vw;
              if (set_mig || m_hit || hit || !m_free || !q_rx_ok || !(v_np || v_m)) begin
                o[no] = mk(M_MIG_ABORT, one(cm.src), UNIT_L2, cm.addr); no++;
              end else begin
                vw = v_np ? w_np : w_m;
                if (!v_np) begin
                  evict_m(cs, vw, o, no);
                  pu_v <= 1'b1; pu_rep <= 1'b1;
                end
                st[cs][vw]  <= L2_RSV;
                tag[cs][vw] <= tag_of(cm.addr);
                ms[f_idx] <= '{kind: MS_MIGISD, addr: cm.addr, way: vw, req: '0, excl: 1'b0,
                               cnt: '0, hit: 1'b0, busy: 1'b0, peer: cm.src, pend: 1'b0};
                o[no] = mk(M_MIG_ACK, one(cm.src), UNIT_L2, cm.addr); no++;
              end
            end
            default: ;
          endcase
        end

        // ================= responses (VNET1) =================
        S_RESP: begin
          case (cm.mtype)
            M_BC_HIT, M_BC_NACK, M_BC_BUSY: begin
              if (m_hit && e.kind == MS_BCAST) begin
                logic h, b;
                h = e.hit  || (cm.mtype == M_BC_HIT);
                b = e.busy || (cm.mtype == M_BC_BUSY);
                if (e.cnt == 5'd1) begin
                  if (h) ms[m_idx].kind <= MS_FREE;
                  else if (b || !(v_np || v_m || v_ev)) begin
                    o[no] = mk(M_RETRY, one(e.req), UNIT_L1, e.addr);
                    o[no].aux = 16'(e.excl ? M_GETX : M_GETS); no++;
                    ms[m_idx].kind <= MS_FREE;
                    ev_retry <= 1'b1;
                  end else begin
                    ms[m_idx].kind <= MS_FREE;
                    mem_fetch(e.addr, e.req, e.excl, m_idx, o, no);
                  end
                end else begin
                  ms[m_idx].cnt  <= e.cnt - 1'b1;
                  ms[m_idx].hit  <= h;
                  ms[m_idx].busy <= b;
                end
              end
            end

            M_MEM_DATA: begin
              if (m_hit && e.kind == MS_MEM) begin
                data[cs][e.way]  <= cm.data;
                dirty[cs][e.way] <= 1'b0;
                st[cs][e.way]    <= L2_MT;
                own[cs][e.way]   <= e.req;
                shr[cs][e.way]   <= '0;
                for (int v = 0; v < int'(WAYS); v++)
                  if (age[cs][v] < age[cs][e.way]) age[cs][v] <= age[cs][v] + 1'b1;
                age[cs][e.way] <= '0;
                o[no] = mk(M_DATA_E, one(e.req), UNIT_L1, e.addr);
                o[no].data = cm.data; no++;
                ms[m_idx].kind <= MS_FREE;
              end
            end

            M_INV_ACK, M_FWD_ACK: begin
              if (m_hit && e.kind inside {MS_INV, MS_FWD, MS_EVICT}) begin
                line_t d;
                logic  dt;
                d  = cm.aux[0] ? cm.data : data[cs][e.way];
                dt = dirty[cs][e.way] | (cm.aux[0] & cm.dirty);
                data[cs][e.way]  <= d;
                dirty[cs][e.way] <= dt;
                if (e.cnt != 5'd1) begin
                  ms[m_idx].cnt <= e.cnt - 1'b1;
                end else begin
                  ms[m_idx].kind <= MS_FREE;
                  case (e.kind)
                    MS_INV: begin
                      o[no] = mk(M_DATA_E, one(e.req), UNIT_L1, e.addr);
                      o[no].data = d; no++;
                      st[cs][e.way]  <= L2_MT;
                      own[cs][e.way] <= e.req;
                      shr[cs][e.way] <= '0;
                    end
                    MS_FWD: begin
                      if (e.excl) begin
                        o[no] = mk(M_DATA_E, one(e.req), UNIT_L1, e.addr);
                        o[no].data = d; no++;
                        own[cs][e.way] <= e.req;
                      end else begin
                        o[no] = mk(M_DATA_S, one(e.req), UNIT_L1, e.addr);
                        o[no].data = d; no++;
                        st[cs][e.way]  <= L2_SS;
                        shr[cs][e.way] <= one(e.req) | (cm.aux[0] ? one(cm.src) : '0);
                      end
                    end
                    default: begin  // MS_EVICT
                      st[cs][e.way] <= L2_NP;
                      if (dt) begin
                        o[no] = mk(M_MEM_WB, one(tile_t'(MEM_TILE)), UNIT_MEM, e.addr);
                        o[no].data = d; no++;
                      end
                      if (home_of(e.addr) != tile_t'(TILE)) begin
                        o[no] = mk(M_SB_DEC, one(home_of(e.addr)), UNIT_L2, e.addr); no++;
                      end
                      pu_v <= 1'b1; pu_rep <= 1'b1;
                    end
                  endcase
                end
              end
            end

            // ---- migration, sender side ----
            M_MIG_ABORT: begin
              if (m_hit && e.kind == MS_XMIGD) begin
                ms[m_idx].kind <= MS_FREE;
                ev_mig_abort <= 1'b1;
              end
            end
            M_MIG_ACK: begin
              if (m_hit && e.kind == MS_XMIGD) begin
                tmask_t tg;
                tg = (st[cs][e.way] == L2_SS) ? shr[cs][e.way] :
                     (st[cs][e.way] == L2_MT) ? one(own[cs][e.way]) : '0;
                if (tg != '0) begin
                  o[no] = mk(M_MIG_NTF, tg, UNIT_L1, e.addr);
                  o[no].aux = 16'(e.peer); no++;
                  ms[m_idx].kind <= MS_MIGSH;
                  ms[m_idx].cnt  <= popc(tg);
                end else begin
                  send_block(cs, e, o, no);
                  ms[m_idx].kind <= MS_MIGI;
                end
              end
            end
            M_NTF_ACK: begin
              if (m_hit && e.kind == MS_MIGSH) begin
                if (e.cnt == 5'd1) begin
                  send_block(cs, e, o, no);
                  ms[m_idx].kind <= MS_MIGI;
                end else begin
                  ms[m_idx].cnt <= e.cnt - 1'b1;
                end
              end
            end
            M_MIG_DONE: begin
              if (m_hit && e.kind == MS_MIGI) begin
                ms[m_idx].kind <= MS_FREE;
                ev_mig_done <= 1'b1;
              end
            end
            // ---- migration, receiver side ----
            M_MIG_DATA: begin
              if (m_hit && e.kind == MS_MIGISD) begin
                data[cs][e.way]  <= cm.data;
                dirty[cs][e.way] <= cm.dirty;
                st[cs][e.way]    <= cm.st;
                shr[cs][e.way]   <= cm.sharers;
                own[cs][e.way]   <= cm.owner;
                for (int v = 0; v < int'(WAYS); v++)
                  if (age[cs][v] < age[cs][e.way]) age[cs][v] <= age[cs][v] + 1'b1;
                age[cs][e.way] <= '0;
                o[no] = mk(M_MIG_DONE, one(e.peer), UNIT_L2, e.addr); no++;
                ms[m_idx].kind <= MS_FREE;
                if (home_of(e.addr) == tile_t'(TILE)) begin
                  sb_dec <= 1'b1; sb_dec_set <= cs;
                end
              end
            end
            M_SB_DEC: begin
              sb_dec <= 1'b1; sb_dec_set <= cs;
            end
            default: ;
          endcase
        end

        // ================= send a deferred memory read =================
        S_MEMRD: begin
          o[no] = mk(M_MEM_RD, one(tile_t'(MEM_TILE)), UNIT_MEM, ms[p_idx].addr); no++;
          ms[p_idx].pend <= 1'b0;
          ev_mem_fetch <= 1'b1;
        end

        // ================= start a migration =================
        S_MIG: begin
          mp_v <= 1'b0;
          if (!set_mig && m_free && v_mig && mp_rx != tile_t'(TILE)) begin
            blk_t a;
            a = blk_of(tag[cs][w_mig], cs);
            o[no] = mk(M_MIG_REQ, one(mp_rx), UNIT_L2, a);
            o[no].aux = 16'(q_metric); no++;
            ms[f_idx] <= '{kind: MS_XMIGD, addr: a, way: w_mig, req: '0, excl: 1'b0,
                           cnt: '0, hit: 1'b0, busy: 1'b0, peer: mp_rx, pend: 1'b0};
            ev_mig_start <= 1'b1;
          end
        end
        default: ;
      endcase

      // append this step's messages to their queues, drain the heads
      for (int v = 0; v < NVNET; v++) begin
        logic [3:0] k;
        k = '0;
        for (int i = 0; i < int'(OL); i++)
          if (i < no && vnet_of(o[i].mtype) == 2'(v)) begin
            oq[v][3'(oq_h[v] + 3'(oq_n[v]) + 3'(k))] <= o[i];
            k = k + 1'b1;
          end
        if (out_valid[v] && out_ready[v]) begin
          oq_h[v] <= oq_h[v] + 1'b1;
          oq_n[v] <= oq_n[v] + k - 1'b1;
        end else begin
          oq_n[v] <= oq_n[v] + k;
        end
      end
    end
  end

  // ---- helpers of the step (write the arrays and the step's outputs) ----

  // fetch a line from memory into a free way, or evict to make room and retry
  task automatic mem_fetch(input blk_t a, input tile_t r, input logic x,
                           input logic [MW-1:0] idx, ref msg_t o[OL], ref int no);
    logic [SW-1:0] s;
    s = set_of(a);
    if (v_np || v_m) begin
      logic [WW-1:0] vw;
      vw = v_np ? w_np : w_m;
      if (!v_np) begin
        evict_m(s, vw, o, no);
        pu_rep <= 1'b1;
      end
      st[s][vw]  <= L2_RSV;
      tag[s][vw] <= tag_of(a);
      ms[idx] <= '{kind: MS_MEM, addr: a, way: vw, req: r, excl: x,
                   cnt: '0, hit: 1'b0, busy: 1'b0, peer: '0, pend: 1'b1};
    end else begin
      if (v_ev) begin
        blk_t va;
        va = blk_of(tag[s][w_ev], s);
        if (st[s][w_ev] == L2_SS) begin
          o[no] = mk(M_INV, shr[s][w_ev], UNIT_L1, va); no++;
        end else begin
          o[no] = mk(M_FWD_GETX, one(own[s][w_ev]), UNIT_L1, va); no++;
        end
        ms[idx] <= '{kind: MS_EVICT, addr: va, way: w_ev, req: r, excl: x,
                     cnt: (st[s][w_ev] == L2_SS) ? popc(shr[s][w_ev]) : 5'd1,
                     hit: 1'b0, busy: 1'b0, peer: '0, pend: 1'b0};
      end
      o[no] = mk(M_RETRY, one(r), UNIT_L1, a);
      o[no].aux = 16'(x ? M_GETX : M_GETS); no++;
      ev_retry <= 1'b1;
    end
  endtask

  // replace an M line (no L1 copies): write back if dirty, tell a foreign home
  task automatic evict_m(input logic [SW-1:0] s, input logic [WW-1:0] vw,
                         ref msg_t o[OL], ref int no);
    blk_t va;
    va = blk_of(tag[s][vw], s);
    if (dirty[s][vw]) begin
      o[no] = mk(M_MEM_WB, one(tile_t'(MEM_TILE)), UNIT_MEM, va);
      o[no].data = data[s][vw]; no++;
    end
    if (home_of(va) != tile_t'(TILE)) begin
      o[no] = mk(M_SB_DEC, one(home_of(va)), UNIT_L2, va); no++;
    end
  endtask

  // MigI: ship the block with its state and directory, free the line here
  task automatic send_block(input logic [SW-1:0] s, input mshr_t me,
                            ref msg_t o[OL], ref int no);
    o[no] = mk(M_MIG_DATA, one(me.peer), UNIT_L2, me.addr);
    o[no].data    = data[s][me.way];
    o[no].dirty   = dirty[s][me.way];
    o[no].st      = st[s][me.way];
    o[no].sharers = shr[s][me.way];
    o[no].owner   = own[s][me.way];
    no++;
    st[s][me.way] <= L2_NP;
    if (home_of(me.addr) == tile_t'(TILE)) begin
      sb_inc <= 1'b1; sb_inc_set <= s;
    end
  endtask

  // no output queue ever overflows
  for (genvar v = 0; v < NVNET; v++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) oq_n[v] <= 4'(OQ));
  end
endmodule
