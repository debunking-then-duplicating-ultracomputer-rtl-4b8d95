// Single-input forward combining queue.
//
// A FIFO of SLOTS request slots. When a fetch-and-add arrives and the queue
// already holds an uncombined fetch-and-add to the same address, the two are
// merged: the queued entry's addend becomes e+f, the arriving request is not
// enqueued, and a decombining record {queued id, arriving id, e} is offered to
// the wait buffer. The queued (older) request will receive the memory value X,
// the arriving one X+e. An entry that is already the result of a combine is not
// combined again in this queue, so one queue merges pairs only.
//
// Decoupled (COUPLED=0, the design this network uses): the head entry is never
// a combining target, so the adder never lies in the same cycle's path as the
// output. COUPLED=1 lets the head combine too; if it leaves in that cycle, the
// summed addend goes out with it.
//
// Adaptive capacity: the queue reports itself full when it holds COMB_LIMIT
// combined entries, even with empty slots. COMB_LIMIT >= SLOTS disables the
// rule (the original, non-adaptive queue).
//
// Interface: valid/ready on input and output. in_ready depends only on state.
// comb_req says the accepted input would combine this cycle; comb_gnt from the
// parent allows it (wait buffer has room, arbitration won). Without a grant the
// request is enqueued normally. out_req is the head entry; an accepted input
// becomes visible at the head one cycle later at the earliest.
//
// From the design description: FIFO order, combining with any non-head queued
// entry, pairs only, 4 slots, adaptive limit of 2 combined entries. Own
// choices: the match is a parallel compare against every slot and the oldest
// matching slot wins; stores never combine.
module fcq_single
  import ucomb_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned COMB_LIMIT = 2,
  parameter bit          COUPLED    = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  // input from one switch input port
  input  logic      in_valid,
  output logic      in_ready,
  input  req_t      in_req,
  // combining handshake with the wait buffer
  output logic      comb_req,
  input  logic      comb_gnt,
  output wb_entry_t comb_entry,
  // output towards the multiplexer
  output logic      out_valid,
  input  logic      out_ready,
  output req_t      out_req,
  // status
  output logic      adapt_block   // not ready only because of the adaptive limit
);

  localparam int unsigned CNT_W = $clog2(SLOTS + 1);
  localparam int unsigned IDX_W = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  req_t                q      [SLOTS];
  logic [SLOTS-1:0]    comb_q;         // slot holds a combined request
  logic [CNT_W-1:0]    cnt;

  logic                match;
  logic [IDX_W-1:0]    midx;
  logic [CNT_W-1:0]    ncomb;
  logic                do_in, do_comb, do_enq, do_pop;

  // number of combined entries present
  always_comb begin
    ncomb = '0;
    for (int i = 0; i < SLOTS; i++) ncomb += CNT_W'(comb_q[i]);
  end

  assign in_ready    = (cnt < CNT_W'(SLOTS)) && (ncomb < CNT_W'(COMB_LIMIT));
  assign adapt_block = (cnt < CNT_W'(SLOTS)) && !(ncomb < CNT_W'(COMB_LIMIT));

  // oldest eligible slot holding a request to the same address
  always_comb begin
    match = 1'b0;
    midx  = '0;
    for (int i = SLOTS - 1; i >= 0; i--) begin
      if ((CNT_W'(i) < cnt) && (COUPLED || i != 0) && !comb_q[i] &&
          (q[i].op == OP_FAA) && (in_req.op == OP_FAA) &&
          (q[i].addr == in_req.addr)) begin
        match = 1'b1;
        midx  = IDX_W'(i);
      end
    end
  end

  assign do_in    = in_valid && in_ready;
  assign comb_req = do_in && match;
  assign do_comb  = comb_req && comb_gnt;
  assign do_enq   = do_in && !do_comb;
  assign do_pop   = out_valid && out_ready;

  assign comb_entry.key    = q[midx].id;
  assign comb_entry.second = in_req.id;
  assign comb_entry.addend = q[midx].data;

  assign out_valid = (cnt != '0);
  always_comb begin
    out_req = q[0];
    if (COUPLED && do_comb && midx == '0) out_req.data = q[0].data + in_req.data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      comb_q <= '0;
      for (int i = 0; i < SLOTS; i++) q[i] <= '0;
    end else begin
      req_t             nq [SLOTS];
      logic [SLOTS-1:0] nc;
      logic [IDX_W-1:0] pos;
      for (int i = 0; i < SLOTS; i++) nq[i] = q[i];
      nc = comb_q;
      if (do_comb) begin
        nq[midx].data = q[midx].data + in_req.data;
        nc[midx]      = 1'b1;
      end
      if (do_pop) begin
        for (int i = 0; i < SLOTS - 1; i++) begin
          nq[i] = nq[i+1];
          nc[i] = nc[i+1];
        end
        nc[SLOTS-1] = 1'b0;
      end
      pos = IDX_W'(cnt - CNT_W'(do_pop));
      if (do_enq) begin
        nq[pos] = in_req;
        nc[pos] = 1'b0;
      end
      for (int i = 0; i < SLOTS; i++) q[i] <= nq[i];
      comb_q <= nc;
      cnt    <= cnt + CNT_W'(do_enq) - CNT_W'(do_pop);
    end
  end

  // a full queue never accepts, and the head leaves only when present
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(do_in && cnt == CNT_W'(SLOTS)))
    else $error("fcq_single: accepted into a full queue");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(do_pop && cnt == '0))
    else $error("fcq_single: popped an empty queue");

endmodule
