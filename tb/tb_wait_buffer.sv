// Test of the wait buffer at its full 100 entries. Checks: a response without
// a record passes unchanged in the same cycle; a response with a record passes
// as is, and the next cycle brings the second response for the merged request
// with value X+e while the input is held off; the record is then gone (the
// same identity later passes unchanged); the buffer reports no room after 100
// records and room again after one is used; records are found wherever they
// sit, in any order of return.
module tb_wait_buffer;
  import ucomb_pkg::*;

  localparam int DEPTH = 100;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      ins_valid;
  wb_entry_t ins_entry;
  logic      room;
  logic      in_valid;
  logic      in_ready;
  rsp_t      in_rsp;
  logic      out_valid;
  logic      out_ready;
  rsp_t      out_rsp;
  logic      ev_decombine;

  wait_buffer dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic msg_id_t mid(int pe, int tag);
    msg_id_t m;
    m.pe = PE_W'(pe); m.tag = TAG_W'(tag);
    return m;
  endfunction

  task automatic insert(int k);
    @(negedge clk);
    ins_valid = 1'b1;
    ins_entry.key    = mid(k, 1);
    ins_entry.second = mid(k + 200, 2);
    ins_entry.addend = DATA_W'(3 * k + 1);
    @(posedge clk);
    @(negedge clk);
    ins_valid = 1'b0;
  endtask

  // send response for key k with value x; expect decombine when `rec`
  task automatic respond(int k, int x, bit rec);
    @(negedge clk);
    in_valid = 1'b1; in_rsp.id = mid(k, 1); in_rsp.data = DATA_W'(x);
    #1;
    check(in_ready && out_valid && out_rsp.id == mid(k, 1) && out_rsp.data == DATA_W'(x),
          $sformatf("response %0d passes unchanged", k));
    check(ev_decombine == rec, $sformatf("response %0d decombine=%0d", k, rec));
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    if (rec) begin
      in_valid = 1'b1; in_rsp.id = mid(999, 0);   // a waiting response must be held off
      #1;
      check(!in_ready, "input held off while the second response goes out");
      check(out_valid && out_rsp.id == mid(k + 200, 2) && out_rsp.data == DATA_W'(x + 3 * k + 1),
            $sformatf("second response for %0d carries X+e", k));
      @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b0; ins_valid = 1'b0; ins_entry = '0; in_valid = 1'b0; in_rsp = '0; out_ready = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    respond(7, 50, 1'b0);
    for (int k = 0; k < DEPTH; k++) begin
      #1;
      check(room, $sformatf("room before record %0d", k));
      insert(k);
    end
    #1;
    check(!room, "no room after 100 records");
    respond(57, 1000, 1'b1);
    #1;
    check(room, "room after one record used");
    respond(57, 1000, 1'b0);     // record removed
    insert(57);
    for (int k = DEPTH - 1; k >= 0; k -= 7) respond(k, 10 * k, 1'b1);

    // back-pressure: the second response waits for the output
    @(negedge clk);
    out_ready = 1'b0;
    in_valid = 1'b1; in_rsp.id = mid(2, 1); in_rsp.data = 5;
    #1;
    check(!in_ready, "no input accepted without output ready");
    @(negedge clk);
    out_ready = 1'b1;
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    out_ready = 1'b0;
    #1;
    check(out_valid && out_rsp.id == mid(202, 2) && out_rsp.data == 5 + 7, "second response held");
    @(negedge clk);
    check(out_valid, "still held");
    out_ready = 1'b1;
    @(negedge clk);
    check(!out_valid, "second response delivered once");

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
