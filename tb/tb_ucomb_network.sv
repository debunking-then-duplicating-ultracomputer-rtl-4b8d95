// Test of the shuffle-exchange network alone, 16 PEs (4 stages), with
// testbench memory models on the MM side.
//   - Routing: every PE sends a request to every MM; each request must arrive
//     at the MM named by its low address bits and its response must come back
//     to the issuing PE with the value the memory model gave it.
//   - Unloaded latency: one cycle per stage each way, so with a memory model
//     that answers in the next cycle a round trip takes 2*4+1 cycles.
//   - Hot spot: all PEs fetch-and-add one word; the returned values must form
//     one serial order, the per-stage combine and decombine counters must
//     agree and combining must reduce the requests reaching the memory.
module tb_ucomb_network;
  import ucomb_pkg::*;

  localparam int unsigned LOG2_N = 4;
  localparam int unsigned N      = 1 << LOG2_N;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        pe_req_valid [N];
  logic        pe_req_ready [N];
  req_t        pe_req       [N];
  logic        pe_rsp_valid [N];
  logic        pe_rsp_ready [N];
  rsp_t        pe_rsp       [N];
  logic        mm_req_valid [N];
  logic        mm_req_ready [N];
  req_t        mm_req       [N];
  logic        mm_rsp_valid [N];
  logic        mm_rsp_ready [N];
  rsp_t        mm_rsp       [N];
  logic [31:0] stage_combines   [LOG2_N];
  logic [31:0] stage_decombines [LOG2_N];
  logic [31:0] stage_adapt_full [LOG2_N];

  ucomb_network #(.LOG2_N(LOG2_N)) dut (.*);

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

  // memory models: one request every 2 cycles, answer next cycle
  int mem [int];
  int mm_served = 0;
  int mm_gap [N];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < N; m++) begin
        if (mm_rsp_valid[m] && mm_rsp_ready[m]) mm_rsp_valid[m] <= 1'b0;
        if (mm_req_valid[m] && mm_req_ready[m]) begin
          int a;
          a = int'(mm_req[m].addr);
          check(mm_req[m].addr[LOG2_N-1:0] == LOG2_N'(m), "request reached the MM of its address");
          if (!mem.exists(a)) mem[a] = 1000 * a;
          mm_rsp[m].id   <= mm_req[m].id;
          mm_rsp[m].data <= DATA_W'(mem[a]);
          mem[a] = mem[a] + int'(mm_req[m].data);
          mm_rsp_valid[m] <= 1'b1;
          mm_gap[m] = 2;
          mm_served++;
        end
        if (mm_gap[m] > 0) mm_gap[m]--;
        mm_req_ready[m] <= (mm_gap[m] == 0) && !(mm_req_valid[m] && mm_req_ready[m]);
      end
    end
  end

  // PE side: per PE a list of (addr, addend) to issue, one outstanding
  int  todo_addr [N][$];
  int  todo_add  [N][$];
  bit  busy [N];
  int  cur_addr [N], cur_add [N], t0 [N], last_lat;
  int  vals [$], adds [$];
  int  hot = 5;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N; p++) begin
        pe_rsp_ready[p] <= 1'b1;
        if (pe_rsp_valid[p] && pe_rsp_ready[p]) begin
          check(busy[p] && pe_rsp[p].id.pe == PE_W'(p), "response returned to its PE");
          last_lat = cycle - t0[p];
          if (cur_addr[p] == hot) begin
            vals.push_back(int'(pe_rsp[p].data));
            adds.push_back(cur_add[p]);
          end else begin
            check(int'(pe_rsp[p].data) == 1000 * cur_addr[p],
                  $sformatf("PE %0d got the value of address %0d", p, cur_addr[p]));
          end
          busy[p] = 1'b0;
        end
        if (pe_req_valid[p] && pe_req_ready[p]) begin
          busy[p] = 1'b1;
          t0[p] = cycle;
          pe_req_valid[p] <= 1'b0;
        end else if (!pe_req_valid[p] && !busy[p] && todo_addr[p].size() > 0) begin
          req_t r;
          r.op = OP_FAA;
          cur_addr[p] = todo_addr[p].pop_front();
          cur_add[p]  = todo_add[p].pop_front();
          r.addr = ADDR_W'(cur_addr[p]);
          r.data = DATA_W'(cur_add[p]);
          r.id.pe = PE_W'(p);
          r.id.tag = '0;
          pe_req_valid[p] <= 1'b1;
          pe_req[p] <= r;
        end
      end
    end
  end

  task automatic wait_idle(int limit);
    int c;
    for (c = 0; c < limit; c++) begin
      bit idle;
      @(posedge clk);
      idle = 1'b1;
      for (int p = 0; p < N; p++)
        if (busy[p] || pe_req_valid[p] || todo_addr[p].size() > 0) idle = 1'b0;
      if (idle) break;
    end
    check(c < limit, "traffic drained");
  endtask

  initial begin
    rst_n = 1'b0;
    for (int p = 0; p < N; p++) begin
      pe_req_valid[p] = 1'b0; pe_req[p] = '0; pe_rsp_ready[p] = 1'b1; busy[p] = 1'b0;
      mm_req_ready[p] = 1'b0; mm_rsp_valid[p] = 1'b0; mm_rsp[p] = '0; mm_gap[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // unloaded latency
    todo_addr[3].push_back(N * 9 + 12); todo_add[3].push_back(0);
    wait_idle(200);
    check(last_lat == 2 * LOG2_N + 1, $sformatf("round trip %0d, expected %0d", last_lat, 2 * LOG2_N + 1));

    // every PE to every MM (distinct words, addend 0)
    for (int p = 0; p < N; p++)
      for (int m = 0; m < N; m++) begin
        todo_addr[p].push_back(N * (p + 20) + ((m + p) % N));
        todo_add[p].push_back(0);
      end
    wait_idle(20000);

    // hot spot
    mm_served = 0;
    for (int p = 0; p < N; p++)
      for (int k = 0; k < 100; k++) begin
        todo_addr[p].push_back(hot);
        todo_add[p].push_back($urandom_range(9, 1));
      end
    wait_idle(100000);
    begin
      int cur, nu, k;
      bit used [$];
      k = vals.size();
      for (int i = 0; i < k; i++) used.push_back(1'b0);
      cur = 1000 * hot; nu = 0;
      for (int s = 0; s < k; s++) begin
        int f;
        f = -1;
        for (int i = 0; i < k; i++) if (!used[i] && vals[i] == cur) f = i;
        if (f < 0) break;
        used[f] = 1'b1; cur += adds[f]; nu++;
      end
      check(k == N * 100 && nu == k, $sformatf("hot spot: %0d of %0d values in one serial order", nu, k));
    end
    for (int s = 0; s < LOG2_N; s++) begin
      $display("stage %0d: combines %0d, decombines %0d, adaptive-full %0d",
               s, stage_combines[s], stage_decombines[s], stage_adapt_full[s]);
      check(stage_combines[s] == stage_decombines[s], "combines undone");
    end
    $display("hot requests %0d, served by memory %0d", N * 100, mm_served);
    check(mm_served < N * 100, "combining reduced memory requests");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
