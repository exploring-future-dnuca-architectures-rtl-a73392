// Shared body of the system testbenches (tb_dnuca_top, tb_dnuca_full).
//
// The including module declares clk/rst_n, the DUT port signals listed below
// and instantiates dnuca_top, then includes this file. It defines, before the
// include: NOPS (random operations per core), POOL (lines in the address pool),
// POOL_HOMES (home banks the pool is spread over), POOL_TAGS, POOL_SETS and
// LIMIT (watchdog, in cycles).
//
// What it checks. Sixteen core models issue random loads and stores of 32-bit
// words. Core c only ever writes word c of a line, so the expected value of
// every word it reads back is exactly known (the last value it wrote, or the
// initial memory pattern), although the lines themselves are shared and
// written by all cores: lost write-backs, stale copies and wrong migrations
// show up as wrong words. After the random phase each core reads back its word
// in every line of the pool. A behavioural memory answers line reads after
// 200 cycles (Table 5.1's main memory latency); the latency of the first cold
// miss is checked against it. Each mechanism of the design (broadcast search,
// memory fetch, write-back, RETRY, migration started/completed/refused) is
// counted and a failure is counted for one that never happened.

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int unsigned MEM_LAT = 200;

  // ---------------- behavioural main memory ----------------
  line_t  mem_store [blk_t];
  blk_t   rq_addr [$];
  tile_t  rq_src  [$];
  longint rq_time [$];
  int n_mem_rd = 0, n_mem_wb = 0;

  function automatic line_t init_line(blk_t a);
    line_t l;
    for (int w = 0; w < int'(WORDS); w++) l[w*WORD_BITS +: WORD_BITS] = {a[19:0], 4'(w), 8'hA5};
    return l;
  endfunction

  assign mem_in_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && mem_in_valid) begin
      if (mem_in_msg.mtype == M_MEM_RD) begin
        rq_addr.push_back(mem_in_msg.addr);
        rq_src.push_back(mem_in_msg.src);
        rq_time.push_back(cycle + MEM_LAT);
        n_mem_rd++;
      end else if (mem_in_msg.mtype == M_MEM_WB) begin
        mem_store[mem_in_msg.addr] = mem_in_msg.data;
        n_mem_wb++;
      end
    end
  end
  always_comb begin
    mem_out_msg = '0;
    mem_out_valid = 1'b0;
    if (rq_addr.size() > 0 && rq_time[0] <= cycle) begin
      mem_out_valid = 1'b1;
      mem_out_msg.mtype    = M_MEM_DATA;
      mem_out_msg.src_unit = UNIT_MEM;
      mem_out_msg.dst_unit = UNIT_L2;
      mem_out_msg.dst_mask = tmask_t'(1) << rq_src[0];
      mem_out_msg.addr     = rq_addr[0];
      mem_out_msg.data     = mem_store.exists(rq_addr[0]) ? mem_store[rq_addr[0]] : init_line(rq_addr[0]);
    end
  end
  always @(posedge clk) begin
    if (rst_n && mem_out_valid && mem_out_ready) begin
      void'(rq_addr.pop_front());
      void'(rq_src.pop_front());
      void'(rq_time.pop_front());
    end
  end

  // ---------------- event counters ----------------
  int n_bcast = 0, n_mig_start = 0, n_mig_done = 0, n_mig_abort = 0, n_retry = 0, n_fetch = 0;
  always @(posedge clk) begin
    n_bcast     <= n_bcast     + $countones(ev_bcast);
    n_mig_start <= n_mig_start + $countones(ev_mig_start);
    n_mig_done  <= n_mig_done  + $countones(ev_mig_done);
    n_mig_abort <= n_mig_abort + $countones(ev_mig_abort);
    n_retry     <= n_retry     + $countones(ev_retry);
    n_fetch     <= n_fetch     + $countones(ev_mem_fetch);
  end

  // ---------------- address pool ----------------
  blk_t pool [POOL];
  initial begin
    for (int i = 0; i < POOL; i++) begin
      blk_t b;
      b = '0;
      b[TILE_BITS-1:0]  = tile_t'(i % POOL_HOMES);
      b[TILE_BITS +: 8] = 8'((i / POOL_HOMES) % POOL_SETS);
      b[20 +: 5]        = 5'(i / (POOL_HOMES * POOL_SETS));
      pool[i] = b;
    end
  end

  // shadow of every core's own word in every pool line
  logic [WORD_BITS-1:0] shadow [POOL][N_TILES];
  initial
    for (int i = 0; i < POOL; i++)
      for (int c = 0; c < int'(N_TILES); c++)
        shadow[i][c] = word_of(init_line(pool[i]), 4'(c));

  // ---------------- core models ----------------
  int done_cores = 0;
  int first_lat = -1;

  task automatic core_op(int c, int li, logic we, logic [WORD_BITS-1:0] wd, logic check);
    logic [WORD_BITS-1:0] got;
    @(posedge clk); #1;
    core_req_valid[c] = 1'b1;
    core_req_we[c]    = we;
    core_req_addr[c]  = {pool[li], 4'(c), 2'b00};
    core_req_wdata[c] = wd;
    do @(posedge clk); while (!core_req_ready[c]);
    #1 core_req_valid[c] = 1'b0;
    do @(posedge clk); while (!core_resp_valid[c]);
    got = core_resp_rdata[c];
    if (check) begin
      checks++;
      if (got !== shadow[li][c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL core %0d line %h %s: got %h expected %h (cycle %0d)", c, pool[li],
                   we ? "store-old" : "load", got, shadow[li][c], cycle);
      end
    end
    if (we) shadow[li][c] = wd;
  endtask

  for (genvar c = 0; c < int'(N_TILES); c++) begin : g_core
    initial begin
      core_req_valid[c] = 1'b0;
      core_req_we[c]    = 1'b0;
      core_req_addr[c]  = '0;
      core_req_wdata[c] = '0;
      wait (rst_n);
      repeat (5) @(posedge clk);
      if (c == 0) begin
        // cold miss: the line comes from memory
        longint t0;
        t0 = cycle;
        core_op(0, 0, 1'b0, '0, 1'b1);
        first_lat = int'(cycle - t0);
        checks++;
        if (first_lat < int'(MEM_LAT) || first_lat > int'(MEM_LAT) + 100) begin
          failures++;
          $display("FAIL cold miss latency %0d cycles", first_lat);
        end
      end else begin
        repeat (400) @(posedge clk);
      end
      for (int k = 0; k < NOPS; k++) begin
        int li;
        logic we;
        li = int'($urandom_range(0, POOL - 1));
        we = ($urandom_range(0, 2) == 0);
        core_op(c, li, we, $urandom(), 1'b1);
      end
      for (int li = 0; li < POOL; li++) core_op(c, li, 1'b0, '0, 1'b1);
      done_cores++;
    end
  end

  task automatic mech(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done_cores == int'(N_TILES));
    repeat (20) @(posedge clk);
    $display("cycles=%0d cold_miss_latency=%0d mem_reads=%0d mem_writebacks=%0d fetches=%0d",
             cycle, first_lat, n_mem_rd, n_mem_wb, n_fetch);
    $display("broadcasts=%0d retries=%0d migrations started=%0d done=%0d refused=%0d",
             n_bcast, n_retry, n_mig_start, n_mig_done, n_mig_abort);
    mech("memory fetch", n_fetch);
    mech("write-back to memory", n_mem_wb);
    mech("RETRY", n_retry);
    mech("broadcast search", n_bcast);
    mech("migration started", n_mig_start);
    mech("migration completed", n_mig_done);
    mech("migration refused", n_mig_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rst_n);
    while (cycle < LIMIT) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d cores done after %0d cycles", done_cores, N_TILES, cycle);
    $display("broadcasts=%0d retries=%0d migrations started=%0d done=%0d refused=%0d fetches=%0d",
             n_bcast, n_retry, n_mig_start, n_mig_done, n_mig_abort, n_fetch);
    for (int c = 0; c < int'(N_TILES); c++)
      if (core_req_valid[c] || !core_req_ready[c])
        $display("  core %0d waiting on address %h", c, core_req_addr[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
