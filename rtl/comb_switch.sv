// 2-by-2 combining switch.
//
// Forward path (PE side to MM side): a request entering PE-side input i goes
// to MM-side output k = address bit STAGE. Each output has a dual-input
// combining queue (fcq) holding requests from both inputs in separate
// single-input queues; requests to the same address from the same input are
// merged there and the decombining record goes to that output's wait buffer.
//
// Reverse path (MM side to PE side): a response entering MM-side input k
// passes wait buffer k, which answers the two merged requests when the
// response belongs to a combined request. The response then goes to PE-side
// output d = bit STAGE of the PE number it carries, into reverse queue d. The
// two requests of a combine came through the same input, so both responses
// go to the same reverse queue.
//
// Links: every output sends at most one message every LINK_CYCLES cycles
// (2 in the design description's simulations). A message meeting an empty
// queue and a free link leaves one cycle after it arrived.
//
// Interface: arrays indexed by port, valid/ready per port. Event outputs pulse
// per combine (per MM-side output), per decombine, and per cycle a request is
// refused only because of the adaptive queue limit.
//
// Defaults are the "improved" switch: 4-slot decoupled type B queues declared
// full at 2 combined entries, 100-entry wait buffers. The original switch is
// COMB_LIMIT=4, WB_DEPTH=8. The reverse queue depth is an own choice.
module comb_switch
  import ucomb_pkg::*;
#(
  parameter int unsigned STAGE       = 0,
  parameter int unsigned FCQ_SLOTS   = 4,
  parameter int unsigned COMB_LIMIT  = 2,
  parameter bit          COUPLED     = 1'b0,
  parameter int unsigned WB_DEPTH    = 100,
  parameter int unsigned RQ_DEPTH    = 4,
  parameter int unsigned LINK_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  // PE side, forward in / reverse out
  input  logic fin_valid  [2],
  output logic fin_ready  [2],
  input  req_t fin_req    [2],
  output logic rout_valid [2],
  input  logic rout_ready [2],
  output rsp_t rout_rsp   [2],
  // MM side, forward out / reverse in
  output logic fout_valid [2],
  input  logic fout_ready [2],
  output req_t fout_req   [2],
  input  logic rin_valid  [2],
  output logic rin_ready  [2],
  input  rsp_t rin_rsp    [2],
  // events
  output logic ev_combine     [2],
  output logic ev_decombine   [2],
  output logic ev_adapt_block [2]
);

  localparam int unsigned LC_W = (LINK_CYCLES > 1) ? $clog2(LINK_CYCLES) : 1;

  // forward path -------------------------------------------------------------
  logic      q_in_valid [2][2];   // [output][input]
  logic      q_in_ready [2][2];
  req_t      q_in_req   [2][2];
  logic      q_out_valid [2];
  logic      q_out_ready [2];
  req_t      q_out_req   [2];
  logic      wb_room     [2];
  logic      wb_ins_valid[2];
  wb_entry_t wb_ins_entry[2];
  logic      f_route     [2];     // output chosen by each input

  always_comb begin
    for (int i = 0; i < 2; i++) f_route[i] = fin_req[i].addr[STAGE];
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 2; i++) begin
        q_in_valid[k][i] = fin_valid[i] && (f_route[i] == k[0]);
        q_in_req[k][i]   = fin_req[i];
      end
    end
    for (int i = 0; i < 2; i++) fin_ready[i] = q_in_ready[f_route[i]][i];
  end

  // reverse path -------------------------------------------------------------
  logic r_wb_valid [2];
  logic r_wb_ready [2];
  rsp_t r_wb_rsp   [2];
  logic r_route    [2];           // PE-side output chosen by each MM-side input
  logic rq_in_valid [2][2];       // [PE-side output][MM-side input]
  logic rq_in_ready [2][2];
  rsp_t rq_in_rsp   [2][2];
  logic rq_out_valid [2];
  logic rq_out_ready [2];
  rsp_t rq_out_rsp   [2];

  always_comb begin
    for (int k = 0; k < 2; k++) r_route[k] = r_wb_rsp[k].id.pe[STAGE];
    for (int d = 0; d < 2; d++) begin
      for (int k = 0; k < 2; k++) begin
        rq_in_valid[d][k] = r_wb_valid[k] && (r_route[k] == d[0]);
        rq_in_rsp[d][k]   = r_wb_rsp[k];
      end
    end
    for (int k = 0; k < 2; k++) r_wb_ready[k] = rq_in_ready[r_route[k]][k];
  end

  // output link pacing ---------------------------------------------------------
  logic [LC_W-1:0] f_gap [2];
  logic [LC_W-1:0] r_gap [2];

  for (genvar k = 0; k < 2; k++) begin : g_port
    fcq #(
      .SLOTS(FCQ_SLOTS), .COMB_LIMIT(COMB_LIMIT), .COUPLED(COUPLED)
    ) u_fcq (
      .clk, .rst_n,
      .in_valid      (q_in_valid[k]),
      .in_ready      (q_in_ready[k]),
      .in_req        (q_in_req[k]),
      .wb_room       (wb_room[k]),
      .wb_ins_valid  (wb_ins_valid[k]),
      .wb_ins_entry  (wb_ins_entry[k]),
      .out_valid     (q_out_valid[k]),
      .out_ready     (q_out_ready[k]),
      .out_req       (q_out_req[k]),
      .ev_combine    (ev_combine[k]),
      .ev_adapt_block(ev_adapt_block[k])
    );

    wait_buffer #(.DEPTH(WB_DEPTH)) u_wb (
      .clk, .rst_n,
      .ins_valid   (wb_ins_valid[k]),
      .ins_entry   (wb_ins_entry[k]),
      .room        (wb_room[k]),
      .in_valid    (rin_valid[k]),
      .in_ready    (rin_ready[k]),
      .in_rsp      (rin_rsp[k]),
      .out_valid   (r_wb_valid[k]),
      .out_ready   (r_wb_ready[k]),
      .out_rsp     (r_wb_rsp[k]),
      .ev_decombine(ev_decombine[k])
    );

    rq #(.DEPTH(RQ_DEPTH)) u_rq (
      .clk, .rst_n,
      .in_valid (rq_in_valid[k]),
      .in_ready (rq_in_ready[k]),
      .in_rsp   (rq_in_rsp[k]),
      .out_valid(rq_out_valid[k]),
      .out_ready(rq_out_ready[k]),
      .out_rsp  (rq_out_rsp[k])
    );

    // forward output k
    assign fout_valid[k]  = q_out_valid[k] && (f_gap[k] == '0);
    assign fout_req[k]    = q_out_req[k];
    assign q_out_ready[k] = fout_ready[k] && (f_gap[k] == '0);

    // reverse output k (towards PE side)
    assign rout_valid[k]   = rq_out_valid[k] && (r_gap[k] == '0);
    assign rout_rsp[k]     = rq_out_rsp[k];
    assign rq_out_ready[k] = rout_ready[k] && (r_gap[k] == '0);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        f_gap[k] <= '0;
        r_gap[k] <= '0;
      end else begin
        if (fout_valid[k] && fout_ready[k]) f_gap[k] <= LC_W'(LINK_CYCLES - 1);
        else if (f_gap[k] != '0)            f_gap[k] <= f_gap[k] - 1'b1;
        if (rout_valid[k] && rout_ready[k]) r_gap[k] <= LC_W'(LINK_CYCLES - 1);
        else if (r_gap[k] != '0)            r_gap[k] <= r_gap[k] - 1'b1;
      end
    end
  end

endmodule
