// Test of one 2x2 combining switch (stage bit 1, wait buffers shrunk to 4
// records so that they fill). Both PE-side inputs send fetch-and-adds with
// random positive addends to a few words; a model of the two memory sides
// serves them in order with random delays and back-pressure. Checks:
//   - routing: forward by address bit 1, reverse by PE-number bit 1;
//   - an uncontended request leaves one cycle after it entered;
//   - links carry at most one message every 2 cycles, in both directions;
//   - per word, the returned old values form one serial order of all requests
//     (so decombining returned X and X+e correctly);
//   - combining happens, every combine is undone once, and never more than 4
//     combined requests per output wait for their response (full wait buffer
//     stops combining), with that limit reached.
module tb_comb_switch;
  import ucomb_pkg::*;

  localparam int STAGE = 1;
  localparam int WBD   = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic fin_valid  [2];
  logic fin_ready  [2];
  req_t fin_req    [2];
  logic rout_valid [2];
  logic rout_ready [2];
  rsp_t rout_rsp   [2];
  logic fout_valid [2];
  logic fout_ready [2];
  req_t fout_req   [2];
  logic rin_valid  [2];
  logic rin_ready  [2];
  rsp_t rin_rsp    [2];
  logic ev_combine     [2];
  logic ev_decombine   [2];
  logic ev_adapt_block [2];

  comb_switch #(.STAGE(STAGE), .WB_DEPTH(WBD)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // memory-side model
  int   mem [int];
  rsp_t pend_q [2][$];
  int   pend_t [2][$];
  int   f_last [2], r_last [2];
  int   n_comb [2], n_dcomb [2], max_wait [2];
  bit   drive = 1'b0, mm_slow = 1'b0;
  int   left [2], outst [2];
  bit   tag_busy [2][16];
  int   tag_addr [2][16], tag_add [2][16];
  int   vals [8][$], adds [8][$];
  int   n_rsp = 0, n_issued = 0;

  function automatic int pe_of(int input_port, int t);
    // PE number with bit STAGE equal to the input port
    return (input_port << STAGE) | (t & 1);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        // statistics
        if (ev_combine[k])   n_comb[k]++;
        if (ev_decombine[k]) n_dcomb[k]++;
        if (n_comb[k] - n_dcomb[k] > max_wait[k]) max_wait[k] = n_comb[k] - n_dcomb[k];
        check(n_comb[k] - n_dcomb[k] <= WBD, "combined requests waiting fit the wait buffer");
        // forward output k: memory model accepts
        if (fout_valid[k] && fout_ready[k]) begin
          rsp_t r;
          int a;
          a = int'(fout_req[k].addr);
          check(fout_req[k].addr[STAGE] == 1'(k), "request routed by address bit");
          check(cycle - f_last[k] >= 2, "forward link paced");
          f_last[k] = cycle;
          if (!mem.exists(a)) mem[a] = 0;
          r.id   = fout_req[k].id;
          r.data = DATA_W'(mem[a]);
          mem[a] = mem[a] + int'(fout_req[k].data);
          pend_q[k].push_back(r);
          pend_t[k].push_back(cycle + (mm_slow ? 40 : $urandom_range(6, 1)));
        end
        fout_ready[k] <= mm_slow ? ($urandom_range(1) == 0) : ($urandom_range(3) != 0);
        if (rin_valid[k] && rin_ready[k]) begin
          void'(pend_q[k].pop_front());
          void'(pend_t[k].pop_front());
        end
        // reverse input k (the head was popped above if it was taken)
        rin_valid[k] <= pend_q[k].size() > 0 && pend_t[k][0] <= cycle + 1;
        rin_rsp[k]   <= (pend_q[k].size() > 0) ? pend_q[k][0] : '0;
        // reverse output k: PE side
        if (rout_valid[k] && rout_ready[k]) begin
          int i, t;
          check(rout_rsp[k].id.pe[STAGE] == 1'(k), "response routed by PE-number bit");
          check(cycle - r_last[k] >= 2, "reverse link paced");
          r_last[k] = cycle;
          i = k;
          t = int'(rout_rsp[k].id.tag);
          check(tag_busy[i][t], "response for a live request");
          tag_busy[i][t] = 1'b0;
          outst[i]--;
          vals[tag_addr[i][t]].push_back(int'(rout_rsp[k].data));
          adds[tag_addr[i][t]].push_back(tag_add[i][t]);
          n_rsp++;
        end
        rout_ready[k] <= ($urandom_range(4) != 0);
      end
      // PE-side inputs
      for (int i = 0; i < 2; i++) begin
        if (fin_valid[i] && fin_ready[i]) begin
          int t;
          t = int'(fin_req[i].id.tag);
          tag_busy[i][t] = 1'b1;
          tag_addr[i][t] = int'(fin_req[i].addr);
          tag_add[i][t]  = int'(fin_req[i].data);
          outst[i]++;
          left[i]--;
          n_issued++;
        end
        if (!(fin_valid[i] && !fin_ready[i])) begin
          int t;
          t = -1;
          for (int j = 15; j >= 0; j--) if (!tag_busy[i][j]) t = j;
          if (drive && left[i] > 0 && t >= 0 && $urandom_range(1) == 0) begin
            req_t r;
            r.op     = OP_FAA;
            r.addr   = ADDR_W'($urandom_range(3) * 2);   // words 0,2,4,6: bit 1 selects the output
            r.data   = DATA_W'($urandom_range(9, 1));
            r.id.pe  = PE_W'(pe_of(i, t));
            r.id.tag = TAG_W'(t);
            fin_valid[i] <= 1'b1;
            fin_req[i]   <= r;
          end else begin
            fin_valid[i] <= 1'b0;
          end
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    for (int k = 0; k < 2; k++) begin
      fin_valid[k] = 1'b0; fin_req[k] = '0; rout_ready[k] = 1'b1;
      fout_ready[k] = 1'b0; rin_valid[k] = 1'b0; rin_rsp[k] = '0;
      f_last[k] = -10; r_last[k] = -10; n_comb[k] = 0; n_dcomb[k] = 0; max_wait[k] = 0;
      left[k] = 0; outst[k] = 0;
      for (int t = 0; t < 16; t++) tag_busy[k][t] = 1'b0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // one request into the empty switch: at the output one cycle later
    @(negedge clk);
    fout_ready[1] = 1'b0;
    force fout_ready[1] = 1'b0;
    fin_valid[0] = 1'b1; fin_req[0] = '0; fin_req[0].addr = ADDR_W'(2); fin_req[0].data = 5;
    fin_req[0].id.tag = 4'd15;
    @(posedge clk); #1;
    fin_valid[0] = 1'b0;
    check(fout_valid[1] && fout_req[1].data == 5 && !fout_valid[0], "request leaves one cycle later on output 1");
    release fout_ready[1];
    tag_busy[0][15] = 1'b1; tag_addr[0][15] = 2; tag_add[0][15] = 5; outst[0] = 1;

    // random traffic, memory side slow first (fills the wait buffers), then fast
    left[0] = 400; left[1] = 400;
    drive = 1'b1; mm_slow = 1'b1;
    repeat (600) @(posedge clk);
    mm_slow = 1'b0;
    while (left[0] > 0 || left[1] > 0 || outst[0] > 0 || outst[1] > 0) @(posedge clk);
    drive = 1'b0;
    repeat (10) @(posedge clk);

    for (int w = 0; w < 8; w++) begin
      int cur, k, nu;
      bit used [$];
      k = vals[w].size();
      used.delete();
      for (int i = 0; i < k; i++) used.push_back(1'b0);
      cur = 0; nu = 0;
      for (int s = 0; s < k; s++) begin
        int f;
        f = -1;
        for (int i = 0; i < k; i++) if (!used[i] && vals[w][i] == cur) f = i;
        if (f < 0) break;
        used[f] = 1'b1; cur += adds[w][f]; nu++;
      end
      check(nu == k, $sformatf("word %0d: %0d returned values form one serial order", w, k));
      if (k > 0) check(mem[w] == cur, $sformatf("word %0d final value", w));
    end
    $display("combines %0d/%0d, decombines %0d/%0d, most waiting %0d/%0d, responses %0d",
             n_comb[0], n_comb[1], n_dcomb[0], n_dcomb[1], max_wait[0], max_wait[1], n_rsp);
    check(n_comb[0] > 0 && n_comb[1] > 0, "both outputs combined");
    check(n_comb[0] == n_dcomb[0] && n_comb[1] == n_dcomb[1], "every combine undone once");
    check(max_wait[0] == WBD || max_wait[1] == WBD, "wait buffer filled up");
    check(n_rsp == n_issued && n_rsp == 801, "every request answered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
