// End-to-end test of the combining system, reduced to 8 PEs (3 stages); all
// other parameters at their defaults.
//
// Processor models issue fetch-and-adds with random positive addends and
// record, per request, the old value returned. Because fetch-and-add is only
// correct if all requests to one word behave as some serial order, the check
// per word is: starting from 0, there must be exactly one response whose
// returned value equals the running sum, and the running sum then grows by
// that request's addend, until every response is used. A final load
// (fetch-and-add of 0) must return the total. This holds whatever combining
// and decombining the network did.
//
// Phases:
//   1. one request into the idle network: latency must be 2*stages + MM latency;
//   2. hot-spot polling: every PE keeps one request outstanding to one word;
//   3. hot spot with 4 outstanding requests per PE;
//   4. uniform traffic over all MMs with random response back-pressure;
//   5. stores to private words, read back with loads.
// Counted mechanisms, each must occur: combining, decombining, combining in more
// than one stage, adaptive queue-full refusals, input back-pressure, fewer
// requests reaching the hot MM than issued to it.
module tb_ucomb_system;
  import ucomb_pkg::*;

  localparam int unsigned LOG2_N     = 3;
  localparam int unsigned N          = 1 << LOG2_N;
  localparam int unsigned MM_LATENCY = 2;
  localparam int unsigned NTRACK     = 32;          // tracked words
  localparam int unsigned HOT_ADDR   = 3;           // word 0 of MM 3
  localparam int unsigned MAXTAG     = 1 << TAG_W;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        pe_req_valid [N];
  logic        pe_req_ready [N];
  req_t        pe_req       [N];
  logic        pe_rsp_valid [N];
  logic        pe_rsp_ready [N];
  rsp_t        pe_rsp       [N];
  logic [31:0] stage_combines   [LOG2_N];
  logic [31:0] stage_decombines [LOG2_N];
  logic [31:0] stage_adapt_full [LOG2_N];
  logic [31:0] mm_requests      [N];

  ucomb_system #(.LOG2_N(LOG2_N)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- traffic
  typedef enum int {PH_IDLE, PH_SINGLE, PH_HOT, PH_UNIFORM, PH_STORE, PH_LOAD} phase_e;
  phase_e phase = PH_IDLE;
  int     max_out;             // outstanding requests allowed per PE
  int     left [N];            // requests still to issue per PE
  int     outstanding [N];
  bit     tag_busy [N][MAXTAG];
  int     tag_addr [N][MAXTAG];
  int     tag_add  [N][MAXTAG];
  op_e    tag_op   [N][MAXTAG];
  int     tag_t0   [N][MAXTAG];
  int     rsp_ready_pct = 100;

  // per tracked word: returned values and addends
  int     vals [NTRACK][$];
  int     adds [NTRACK][$];
  int     load_val [N];

  // statistics
  int     n_stall = 0, n_rsp = 0, lat_sum = 0, last_lat = 0;
  int     hot_issued = 0;

  function automatic int track_idx(int addr);
    // tracked words: word w of MM m is address w*N+m, index w*N+m
    return addr;
  endfunction

  function automatic int pick_tag(int p);
    for (int t = 0; t < MAXTAG; t++) if (!tag_busy[p][t]) return t;
    return -1;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin
        pe_req_valid[p] <= 1'b0;
        pe_req[p]       <= '0;
        pe_rsp_ready[p] <= 1'b1;
      end
    end else begin
      for (int p = 0; p < N; p++) begin
        // responses
        if (pe_rsp_valid[p] && pe_rsp_ready[p]) begin
          int t;
          t = int'(pe_rsp[p].id.tag);
          check(int'(pe_rsp[p].id.pe) == p && tag_busy[p][t], "response reached its PE with a live tag");
          if (tag_busy[p][t]) begin
            tag_busy[p][t] = 1'b0;
            outstanding[p]--;
            n_rsp++;
            last_lat = cycle - tag_t0[p][t];
            lat_sum += last_lat;
            if (tag_op[p][t] == OP_FAA && tag_add[p][t] != 0) begin
              vals[track_idx(tag_addr[p][t])].push_back(int'(pe_rsp[p].data));
              adds[track_idx(tag_addr[p][t])].push_back(tag_add[p][t]);
            end else if (tag_op[p][t] == OP_FAA) begin
              load_val[p] = int'(pe_rsp[p].data);
            end
          end
        end
        pe_rsp_ready[p] <= ($urandom_range(99) < rsp_ready_pct);
        // requests
        if (pe_req_valid[p] && !pe_req_ready[p]) n_stall++;
        if (pe_req_valid[p] && pe_req_ready[p]) begin
          int t;
          t = int'(pe_req[p].id.tag);
          tag_busy[p][t] = 1'b1;
          tag_addr[p][t] = int'(pe_req[p].addr);
          tag_add[p][t]  = int'(pe_req[p].data);
          tag_op[p][t]   = pe_req[p].op;
          tag_t0[p][t]   = cycle;
          outstanding[p]++;
          left[p]--;
          if (int'(pe_req[p].addr) == HOT_ADDR) hot_issued++;
        end
        if (!(pe_req_valid[p] && !pe_req_ready[p])) begin
          int t;
          t = pick_tag(p);
          if (phase != PH_IDLE && left[p] > 0 && outstanding[p] < max_out && t >= 0) begin
            req_t r;
            r.id.pe  = PE_W'(p);
            r.id.tag = TAG_W'(t);
            r.op     = OP_FAA;
            r.data   = DATA_W'($urandom_range(7, 1));
            case (phase)
              PH_SINGLE, PH_HOT: r.addr = ADDR_W'(HOT_ADDR);
              PH_UNIFORM:        r.addr = ADDR_W'($urandom_range(NTRACK - 1));
              PH_STORE: begin
                r.op   = OP_STORE;
                r.addr = ADDR_W'(NTRACK + p);
                r.data = DATA_W'(1000 + 7 * p);
              end
              default: begin        // load: fetch-and-add of zero
                r.addr = ADDR_W'(NTRACK + p);
                r.data = '0;
              end
            endcase
            pe_req_valid[p] <= 1'b1;
            pe_req[p]       <= r;
          end else begin
            pe_req_valid[p] <= 1'b0;
          end
        end
      end
    end
  end

  task automatic run_phase(phase_e ph, int per_pe, int pe_mask, int outs, int limit);
    int c;
    for (int p = 0; p < N; p++) left[p] = ((pe_mask >> p) & 1) ? per_pe : 0;
    max_out = outs;
    phase   = ph;
    c = 0;
    while (c < limit) begin
      bit done;
      @(posedge clk);
      c++;
      done = 1'b1;
      for (int p = 0; p < N; p++) if (left[p] != 0 || outstanding[p] != 0) done = 1'b0;
      if (done) break;
    end
    phase = PH_IDLE;
    check(c < limit, $sformatf("phase %0d finished", ph));
    repeat (4) @(posedge clk);
  endtask

  // serial-order check of every tracked word
  task automatic check_words();
    for (int w = 0; w < NTRACK; w++) begin
      int cur, k;
      bit used [$];
      k = vals[w].size();
      for (int i = 0; i < k; i++) used.push_back(1'b0);
      cur = 0;
      for (int step = 0; step < k; step++) begin
        int found;
        found = -1;
        for (int i = 0; i < k; i++) if (!used[i] && vals[w][i] == cur) found = i;
        if (found < 0) break;
        used[found] = 1'b1;
        cur += adds[w][found];
      end
      begin
        int n_used;
        n_used = 0;
        foreach (used[i]) if (used[i]) n_used++;
        check(n_used == k, $sformatf("word %0d: %0d fetch-and-adds form one serial order (%0d of them fit)", w, k, n_used));
      end
    end
  endtask

  int sum_comb, sum_dcomb, sum_ablk, stages_comb;

  initial begin
    rst_n = 1'b0;
    for (int p = 0; p < N; p++) begin
      outstanding[p] = 0;
      left[p] = 0;
      for (int t = 0; t < MAXTAG; t++) tag_busy[p][t] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. unloaded latency
    run_phase(PH_SINGLE, 1, 1, 1, 100);
    check(last_lat == 2 * LOG2_N + MM_LATENCY,
          $sformatf("unloaded round trip %0d cycles, expected %0d", last_lat, 2 * LOG2_N + MM_LATENCY));

    // 2. hot-spot polling, one outstanding request per PE
    lat_sum = 0; n_rsp = 0;
    run_phase(PH_HOT, 200, (1 << N) - 1, 1, 40000);
    $display("hot-spot polling: mean round trip %0d.%02d cycles",
             lat_sum / n_rsp, (lat_sum * 100 / n_rsp) % 100);

    // 3. hot spot, four outstanding per PE
    run_phase(PH_HOT, 200, (1 << N) - 1, 4, 40000);

    // 4. uniform traffic with response back-pressure
    rsp_ready_pct = 70;
    run_phase(PH_UNIFORM, 200, (1 << N) - 1, 4, 40000);
    rsp_ready_pct = 100;

    // 5. stores then loads on private words
    run_phase(PH_STORE, 1, (1 << N) - 1, 1, 1000);
    run_phase(PH_LOAD, 1, (1 << N) - 1, 1, 1000);
    for (int p = 0; p < N; p++)
      check(load_val[p] == 1000 + 7 * p, $sformatf("PE %0d reads back its store", p));

    // final load of every tracked word returns the sum of its addends
    check_words();
    begin
      int hot_total;
      hot_total = 0;
      foreach (adds[HOT_ADDR][i]) hot_total += adds[HOT_ADDR][i];
      check(int'(dut.g_mm[HOT_ADDR % N].u_mm.mem[HOT_ADDR / N]) == hot_total,
            "hot word holds the sum of all addends");
    end

    // mechanisms
    sum_comb = 0; sum_dcomb = 0; sum_ablk = 0; stages_comb = 0;
    for (int s = 0; s < LOG2_N; s++) begin
      $display("stage %0d: combines %0d decombines %0d adaptive-full refusals %0d",
               s, stage_combines[s], stage_decombines[s], stage_adapt_full[s]);
      sum_comb  += int'(stage_combines[s]);
      sum_dcomb += int'(stage_decombines[s]);
      sum_ablk  += int'(stage_adapt_full[s]);
      if (stage_combines[s] != 0) stages_comb++;
      check(stage_combines[s] == stage_decombines[s], $sformatf("stage %0d decombines every combine", s));
    end
    $display("hot requests issued %0d, reaching the hot MM %0d; input stalls %0d",
             hot_issued, mm_requests[HOT_ADDR % N], n_stall);
    check(sum_comb > 0, "combining happened");
    check(sum_dcomb > 0, "decombining happened");
    check(stages_comb >= 2, "combining happened in more than one stage");
    check(sum_ablk > 0, "adaptive queue limit refused a request");
    check(n_stall > 0, "input back-pressure happened");
    check(int'(mm_requests[HOT_ADDR % N]) < hot_issued, "combining reduced the requests reaching the hot MM");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
