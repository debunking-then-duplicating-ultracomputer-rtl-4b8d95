// Directed test of the dual-input (type B) combining queue. Checks: requests
// to one address arriving on different inputs do not combine (separate
// queues); on the same input they do, once the first is no longer the head;
// when both inputs want to combine in one cycle only one wait-buffer record is
// written and the other request is enqueued; no combining without wait-buffer
// room; the output alternates between the two queues; every request or its
// merged sum leaves exactly once.
module tb_fcq;
  import ucomb_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      in_valid [2];
  logic      in_ready [2];
  req_t      in_req   [2];
  logic      wb_room;
  logic      wb_ins_valid;
  wb_entry_t wb_ins_entry;
  logic      out_valid;
  logic      out_ready;
  req_t      out_req;
  logic      ev_combine;
  logic      ev_adapt_block;

  fcq dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic req_t mk(int addr, int data, int pe, int tag);
    req_t r;
    r.op = OP_FAA; r.addr = ADDR_W'(addr); r.data = DATA_W'(data);
    r.id.pe = PE_W'(pe); r.id.tag = TAG_W'(tag);
    return r;
  endfunction

  int n_ins = 0;
  always @(posedge clk) if (rst_n && wb_ins_valid) n_ins <= n_ins + 1;

  // drive both inputs for one cycle (v0/v1 select which)
  task automatic push2(bit v0, req_t r0, bit v1, req_t r1);
    @(negedge clk);
    in_valid[0] = v0; in_req[0] = r0;
    in_valid[1] = v1; in_req[1] = r1;
    @(posedge clk);
    @(negedge clk);
    in_valid[0] = 1'b0; in_valid[1] = 1'b0;
  endtask

  req_t got [$];
  task automatic drain();
    @(negedge clk);
    out_ready = 1'b1;
    while (1) begin
      #1;
      if (!out_valid) break;
      got.push_back(out_req);
      @(negedge clk);
    end
    out_ready = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; out_ready = 1'b0; wb_room = 1'b1;
    for (int i = 0; i < 2; i++) begin in_valid[i] = 1'b0; in_req[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // same address on both inputs: separate queues, no combining
    push2(1, mk(5, 1, 0, 0), 1, mk(5, 2, 1, 0));
    push2(1, mk(5, 4, 0, 1), 1, mk(5, 8, 1, 1));   // second entries, both behind a head
    check(n_ins == 0, "no combining across inputs or with a head");
    // now both inputs can combine with their second entry in the same cycle
    @(negedge clk);
    in_valid[0] = 1'b1; in_req[0] = mk(5, 16, 0, 2);
    in_valid[1] = 1'b1; in_req[1] = mk(5, 32, 1, 2);
    #1;
    check(wb_ins_valid && ev_combine, "one record written");
    @(posedge clk);
    @(negedge clk);
    in_valid[0] = 1'b0; in_valid[1] = 1'b0;
    check(n_ins == 1, "only one combine in a cycle with two candidates");
    // next cycle the other input's request combines alone
    push2(1, mk(5, 64, 0, 3), 0, '0);
    push2(0, '0, 1, mk(5, 128, 1, 3));
    check(n_ins == 2, "the losing queue's entry combined later, the winner's not twice");

    drain();
    begin
      int total;
      total = 0;
      foreach (got[i]) total += int'(got[i].data);
      check(total == 255, $sformatf("all addends leave: sum %0d", total));
      check(got.size() == 8 - n_ins, $sformatf("%0d messages left the queue", got.size()));
      for (int i = 1; i < got.size() && i < 4; i++)
        check(got[i].id.pe != got[i-1].id.pe, "output alternates between the queues");
    end

    // no wait-buffer room: no combining
    got.delete();
    wb_room = 1'b0;
    push2(1, mk(9, 1, 0, 4), 0, '0);
    push2(1, mk(9, 1, 0, 5), 0, '0);
    push2(1, mk(9, 1, 0, 6), 0, '0);
    check(n_ins == 2, "no combining while the wait buffer is full");
    drain();
    check(got.size() == 3, "three separate requests");
    wb_room = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
