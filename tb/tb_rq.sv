// Test of the dual-input reverse queue (4 entries per input). Random traffic on
// both inputs and random output back-pressure; a scoreboard per input checks
// that every response leaves exactly once and in order per input. Directed
// checks: an input is refused after 4 queued responses, a response entering an
// empty queue is at the output one cycle later, and with both queues holding
// responses the output alternates.
module tb_rq;
  import ucomb_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid [2];
  logic in_ready [2];
  rsp_t in_rsp   [2];
  logic out_valid;
  logic out_ready;
  rsp_t out_rsp;

  rq dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int exp_q [2][$];
  int sent [2];
  int recv = 0;
  bit random_mode = 1'b0;
  int last_src = -1, alternations = 0, both_busy = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 2; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          exp_q[i].push_back(int'(in_rsp[i].data));
          sent[i]++;
        end
      end
      if (out_valid && out_ready) begin
        int src;
        src = int'(out_rsp.id.tag);
        check(src < 2 && exp_q[src].size() > 0 && exp_q[src][0] == int'(out_rsp.data),
              "response leaves in order of its input");
        if (src < 2 && exp_q[src].size() > 0) void'(exp_q[src].pop_front());
        if (last_src >= 0 && src != last_src) alternations++;
        last_src = src;
        recv++;
      end
      if (random_mode) begin
        for (int i = 0; i < 2; i++) begin
          if (!(in_valid[i] && !in_ready[i])) begin
            in_valid[i] <= ($urandom_range(3) != 0) && sent[i] < 300;
            in_rsp[i].data <= DATA_W'($urandom);
            in_rsp[i].id.tag <= TAG_W'(i);
          end
        end
        out_ready <= ($urandom_range(2) != 0);
      end
    end
  end

  initial begin
    rst_n = 1'b0; out_ready = 1'b0;
    sent[0] = 0; sent[1] = 0;
    for (int i = 0; i < 2; i++) begin in_valid[i] = 1'b0; in_rsp[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // one-cycle pass
    @(negedge clk);
    in_valid[0] = 1'b1; in_rsp[0].data = 11; in_rsp[0].id.tag = 0;
    @(posedge clk); #1;
    in_valid[0] = 1'b0;
    check(out_valid && out_rsp.data == 11, "response at output one cycle after entry");
    // fill input 1 to its depth
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      check(in_ready[1], "input 1 accepts");
      in_valid[1] = 1'b1; in_rsp[1].data = DATA_W'(20 + k); in_rsp[1].id.tag = 1;
    end
    @(negedge clk);
    in_valid[1] = 1'b0;
    check(!in_ready[1] && in_ready[0], "input 1 full after 4, input 0 free");
    @(negedge clk);
    out_ready = 1'b1;
    repeat (6) @(negedge clk);
    out_ready = 1'b0;
    check(recv == 5 && alternations == 1, "drained in order, alternating once");

    random_mode = 1'b1;
    repeat (3000) @(posedge clk);
    random_mode = 1'b0;
    @(negedge clk);
    in_valid[0] = 1'b0; in_valid[1] = 1'b0; out_ready = 1'b1;
    repeat (20) @(negedge clk);
    check(recv == sent[0] + sent[1] && sent[0] > 100 && sent[1] > 100,
          $sformatf("all %0d responses delivered once (%0d received)", sent[0] + sent[1], recv));
    check(alternations > 50, "output shared between the inputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
