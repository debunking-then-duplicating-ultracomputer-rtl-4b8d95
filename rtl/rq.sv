// Dual-input reverse (to-PE) queue.
//
// Responses for one PE-side output of the switch can come from both memory-side
// inputs in the same cycle, so, like the forward combining queue, the reverse
// queue is two independent single-input FIFOs whose heads share the output link
// through a round-robin multiplexer. Entries leave in FIFO order per input.
//
// Interface: per-input valid/ready, one output valid/ready. A response accepted
// in cycle t can leave in cycle t+1.
//
// From the design description: dual-input, FIFO insertion and deletion. Own
// choices: the split into two FIFOs (mirroring the forward queue), DEPTH per
// FIFO and the round-robin multiplexer.
module rq
  import ucomb_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [2],
  output logic in_ready [2],
  input  rsp_t in_rsp   [2],
  output logic out_valid,
  input  logic out_ready,
  output rsp_t out_rsp
);

  logic q_valid [2];
  logic q_ready [2];
  rsp_t q_rsp   [2];
  logic out_sel;
  logic rr;

  for (genvar i = 0; i < 2; i++) begin : g_q
    sync_fifo #(.T(rsp_t), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_rsp[i]),
      .out_valid(q_valid[i]),
      .out_ready(q_ready[i]),
      .out_data (q_rsp[i])
    );
  end

  always_comb begin
    if (q_valid[0] && q_valid[1]) out_sel = rr;
    else                          out_sel = q_valid[1];
  end
  assign out_valid  = q_valid[0] || q_valid[1];
  assign out_rsp    = out_sel ? q_rsp[1] : q_rsp[0];
  assign q_ready[0] = out_ready && !out_sel;
  assign q_ready[1] = out_ready &&  out_sel;

  always_ff @(posedge clk) begin
    if (!rst_n)                      rr <= 1'b0;
    else if (out_valid && out_ready) rr <= !out_sel;
  end

endmodule
