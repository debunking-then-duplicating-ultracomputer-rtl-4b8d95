// Test of the memory module with its default timing (one request every 4
// cycles, 2 cycles latency). A reference array in the testbench predicts every
// returned old value and the final memory contents for random fetch-and-adds
// and stores, including word aliasing. Checks that accepts are at least 4
// cycles apart and exactly 4 apart under continuous offer, that each response
// appears exactly 2 cycles after its request was accepted, and that a response
// is held (and no new request accepted) while the response side stalls.
module tb_mm;
  import ucomb_pkg::*;

  localparam int LOG2_N = 3;
  localparam int WORDS  = 256;

  logic clk = 1'b0;
  logic rst_n;
  logic req_valid;
  logic req_ready;
  req_t req;
  logic rsp_valid;
  logic rsp_ready;
  rsp_t rsp;

  mm dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [DATA_W-1:0] ref_mem [WORDS];
  int cycle = 0, last_acc = -100, acc_cycle = 0, n_acc = 0, n_rsp = 0, gaps4 = 0;
  logic [DATA_W-1:0] exp_data;
  msg_id_t           exp_id;
  bit                rsp_random = 1'b0;
  bit                drive = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (rsp_valid && rsp_ready) begin
        check(rsp.data == exp_data && rsp.id == exp_id, "returned old value and id");
        check(cycle - acc_cycle >= 2, "response not before latency");
        if (!rsp_random) check(cycle - acc_cycle == 2, $sformatf("latency %0d, expected 2", cycle - acc_cycle));
        n_rsp++;
      end
      if (req_valid && req_ready) begin
        int w;
        w = int'(req.addr[LOG2_N +: 8]);
        check(cycle - last_acc >= 4, "accept interval at least 4");
        if (!rsp_random && cycle - last_acc == 4) gaps4++;
        exp_data = ref_mem[w];
        exp_id   = req.id;
        if (req.op == OP_FAA) ref_mem[w] = ref_mem[w] + req.data;
        else                  ref_mem[w] = req.data;
        last_acc  = cycle;
        acc_cycle = cycle;
        n_acc++;
      end
      if (drive && !(req_valid && !req_ready)) begin
        req_t r;
        r.op   = ($urandom_range(4) == 0) ? OP_STORE : OP_FAA;
        r.addr = ADDR_W'({$urandom_range(15), 3'(3)});  // 16 words of MM 3
        r.data = DATA_W'($urandom);
        r.id.pe  = PE_W'($urandom);
        r.id.tag = TAG_W'($urandom);
        req_valid <= 1'b1;
        req       <= r;
      end else if (!drive && req_valid && req_ready) begin
        req_valid <= 1'b0;
      end
      rsp_ready <= rsp_random ? ($urandom_range(3) == 0) : 1'b1;
    end
  end

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req = '0; rsp_ready = 1'b1;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    drive = 1'b1;
    repeat (400) @(posedge clk);
    check(gaps4 > 90, $sformatf("continuous offer accepted every 4 cycles (%0d)", gaps4));
    rsp_random = 1'b1;
    repeat (600) @(posedge clk);
    drive = 1'b0;
    rsp_random = 1'b0;
    repeat (20) @(posedge clk);
    check(n_rsp == n_acc && n_acc > 150, $sformatf("%0d requests, %0d responses", n_acc, n_rsp));
    for (int i = 0; i < 16; i++)
      check(dut.mem[i] == ref_mem[i], $sformatf("final word %0d", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
