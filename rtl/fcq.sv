// Dual-input forward (to-MM) combining queue, "type B".
//
// Each of the switch's two inputs has its own single-input combining queue
// (fcq_single), so both inputs can deliver a request in the same cycle.
// Requests therefore only combine with requests that entered through the same
// input. The two queue heads share the output link through a round-robin
// multiplexer. Both queues write decombining records into the one wait buffer
// of this output; at most one record is written per cycle, so when both inputs
// want to combine in the same cycle one of them (alternating) is granted and
// the other request is simply enqueued. No combining is done while the wait
// buffer is full.
//
// Interface: per-input valid/ready, one output valid/ready, and a write port
// to the wait buffer (wb_ins_valid/wb_ins_entry, with wb_room from it).
// Timing: a request accepted in cycle t can leave in cycle t+1.
//
// From the design description: two independent single-input queues with
// multiplexed outputs, combining only within one input's queue. Own choices:
// the round-robin output multiplexer and the alternating grant of the single
// wait-buffer write port.
module fcq
  import ucomb_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned COMB_LIMIT = 2,
  parameter bit          COUPLED    = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid [2],
  output logic      in_ready [2],
  input  req_t      in_req   [2],
  // wait buffer write port
  input  logic      wb_room,
  output logic      wb_ins_valid,
  output wb_entry_t wb_ins_entry,
  // output link
  output logic      out_valid,
  input  logic      out_ready,
  output req_t      out_req,
  // events
  output logic      ev_combine,
  output logic      ev_adapt_block
);

  logic      q_comb_req [2];
  logic      q_comb_gnt [2];
  wb_entry_t q_entry    [2];
  logic      q_valid    [2];
  logic      q_ready    [2];
  req_t      q_req      [2];
  logic      q_ablock   [2];

  logic      out_sel;   // which queue the output takes this cycle
  logic      rr;        // output priority
  logic      cprio;     // combining-grant priority

  for (genvar i = 0; i < 2; i++) begin : g_q
    fcq_single #(
      .SLOTS(SLOTS), .COMB_LIMIT(COMB_LIMIT), .COUPLED(COUPLED)
    ) u_q (
      .clk, .rst_n,
      .in_valid   (in_valid[i]),
      .in_ready   (in_ready[i]),
      .in_req     (in_req[i]),
      .comb_req   (q_comb_req[i]),
      .comb_gnt   (q_comb_gnt[i]),
      .comb_entry (q_entry[i]),
      .out_valid  (q_valid[i]),
      .out_ready  (q_ready[i]),
      .out_req    (q_req[i]),
      .adapt_block(q_ablock[i])
    );
  end

  // one wait-buffer write per cycle
  assign q_comb_gnt[0] = wb_room && q_comb_req[0] && (!q_comb_req[1] || !cprio);
  assign q_comb_gnt[1] = wb_room && q_comb_req[1] && (!q_comb_req[0] ||  cprio);
  assign wb_ins_valid  = q_comb_gnt[0] || q_comb_gnt[1];
  assign wb_ins_entry  = q_comb_gnt[1] ? q_entry[1] : q_entry[0];

  // round-robin output multiplexer
  always_comb begin
    if (q_valid[0] && q_valid[1]) out_sel = rr;
    else                          out_sel = q_valid[1];
  end
  assign out_valid  = q_valid[0] || q_valid[1];
  assign out_req    = out_sel ? q_req[1] : q_req[0];
  assign q_ready[0] = out_ready && !out_sel;
  assign q_ready[1] = out_ready &&  out_sel;

  assign ev_combine     = wb_ins_valid;
  assign ev_adapt_block = (in_valid[0] && q_ablock[0]) || (in_valid[1] && q_ablock[1]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr    <= 1'b0;
      cprio <= 1'b0;
    end else begin
      if (out_valid && out_ready) rr <= !out_sel;
      if (q_comb_req[0] && q_comb_req[1] && wb_room) cprio <= !cprio;
    end
  end

endmodule
