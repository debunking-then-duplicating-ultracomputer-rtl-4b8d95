// Directed test of the single-input combining queue (decoupled, 4 slots,
// adaptive limit 2). Checks, against hand-worked expectations: the head entry
// is never combined; a later matching request merges into the oldest uncombined
// non-head entry with the addends summed and the right decombining record;
// combined entries are not combined again; stores and other addresses never
// combine; a refused grant enqueues the request instead; the queue reports full
// at 4 entries, and at 2 combined entries with slots free (adaptive limit);
// entries leave in FIFO order one cycle after entering at the earliest.
module tb_fcq_single;
  import ucomb_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      in_valid;
  logic      in_ready;
  req_t      in_req;
  logic      comb_req;
  logic      comb_gnt;
  wb_entry_t comb_entry;
  logic      out_valid;
  logic      out_ready;
  req_t      out_req;
  logic      adapt_block;

  fcq_single dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic req_t mk(op_e op, int addr, int data, int pe, int tag);
    req_t r;
    r.op = op; r.addr = ADDR_W'(addr); r.data = DATA_W'(data);
    r.id.pe = PE_W'(pe); r.id.tag = TAG_W'(tag);
    return r;
  endfunction

  // push one request; report whether it combined (sampled before the edge)
  task automatic push(req_t r, bit gnt, output bit combined, output wb_entry_t e);
    @(negedge clk);
    in_valid = 1'b1; in_req = r; comb_gnt = gnt;
    #1;
    check(in_ready, "queue ready for push");
    combined = comb_req && gnt;
    e = comb_entry;
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0; comb_gnt = 1'b0;
  endtask

  // pop the head and compare
  task automatic pop_expect(int data, int pe, int tag, string what);
    @(negedge clk);
    check(out_valid, {what, ": head present"});
    check(out_req.data == DATA_W'(data) && out_req.id.pe == PE_W'(pe) && out_req.id.tag == TAG_W'(tag),
          $sformatf("%s: head data %0d pe %0d tag %0d, expected %0d %0d %0d",
                    what, out_req.data, out_req.id.pe, out_req.id.tag, data, pe, tag));
    out_ready = 1'b1;
    @(posedge clk);
    @(negedge clk);
    out_ready = 1'b0;
  endtask

  bit        c;
  wb_entry_t e;
  int        cyc;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_req = '0; comb_gnt = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // a request entering an empty queue is at the head the next cycle
    @(negedge clk);
    in_valid = 1'b1; in_req = mk(OP_FAA, 9, 3, 1, 1);
    @(posedge clk); #1;
    in_valid = 1'b0;
    check(out_valid && out_req.addr == ADDR_W'(9), "one-cycle pass");
    pop_expect(3, 1, 1, "pass-through");

    // head is not a combining target (decoupled)
    push(mk(OP_FAA, 5, 1, 0, 0), 1'b1, c, e);  check(!c, "first request enqueued");
    push(mk(OP_FAA, 5, 2, 1, 0), 1'b1, c, e);  check(!c, "no combining with the head");
    push(mk(OP_FAA, 5, 4, 2, 0), 1'b1, c, e);  check(c, "combines with second entry");
    check(e.key.pe == PE_W'(1) && e.second.pe == PE_W'(2) && e.addend == DATA_W'(2),
          "decombining record {key pe1, second pe2, addend 2}");
    push(mk(OP_FAA, 5, 8, 3, 0), 1'b1, c, e);  check(!c, "combined entry not combined again");
    check(in_ready && !adapt_block, "three entries, one combined: still ready");
    pop_expect(1, 0, 0, "head");
    pop_expect(6, 1, 0, "combined entry carries e+f");
    pop_expect(8, 3, 0, "third entry");
    @(negedge clk); check(!out_valid, "queue empty");

    // stores, other addresses and refused grants do not combine
    push(mk(OP_FAA, 7, 1, 0, 1), 1'b1, c, e);
    push(mk(OP_STORE, 7, 5, 1, 1), 1'b1, c, e);  check(!c, "store enqueued");
    push(mk(OP_FAA, 7, 1, 2, 1), 1'b1, c, e);    check(!c, "FAA does not combine with a store");
    push(mk(OP_FAA, 7, 1, 3, 1), 1'b0, c, e);    check(!c && comb_req == 1'b0, "without grant it is enqueued");
    check(!in_ready, "four entries");
    pop_expect(1, 0, 1, "a"); pop_expect(5, 1, 1, "b"); pop_expect(1, 2, 1, "c"); pop_expect(1, 3, 1, "d");

    // adaptive limit: two combined entries make the queue full with a slot free
    push(mk(OP_FAA, 1, 1, 0, 2), 1'b1, c, e);
    push(mk(OP_FAA, 2, 1, 1, 2), 1'b1, c, e);
    push(mk(OP_FAA, 2, 1, 2, 2), 1'b1, c, e);  check(c, "combine 1");
    push(mk(OP_FAA, 3, 1, 3, 2), 1'b1, c, e);
    push(mk(OP_FAA, 3, 2, 4, 2), 1'b1, c, e);  check(c, "combine 2");
    @(negedge clk); in_valid = 1'b1; in_req = mk(OP_FAA, 4, 1, 5, 2); #1;
    check(!in_ready && adapt_block, "adaptive limit: full with 3 of 4 slots used");
    in_valid = 1'b0;
    pop_expect(1, 0, 2, "x");
    check(!in_ready, "still two combined entries");
    pop_expect(2, 1, 2, "y");
    check(in_ready && !adapt_block, "one combined entry left: ready again");
    pop_expect(3, 3, 2, "z");

    // throughput: continuous push and pop, one per cycle
    @(negedge clk);
    cyc = 0;
    out_ready = 1'b1;
    for (int i = 0; i < 8; i++) begin
      in_valid = 1'b1; in_req = mk(OP_FAA, 100 + i, i, 0, i);
      @(posedge clk); #1;
      check(out_valid && out_req.addr == ADDR_W'(100 + i), "streaming, one per cycle");
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    out_ready = 1'b0;

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
