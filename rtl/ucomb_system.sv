// Combining shared-memory system: N processor ports, a shuffle-exchange
// network of combining switches, and N memory modules.
//
// Processors (not part of this RTL) issue fetch-and-add and store requests on
// their ports and receive one response per request, carrying the request's
// PE number and tag. The low LOG2_N address bits select the memory module.
// Concurrent fetch-and-adds to one word that meet in a switch queue are merged
// there and split again on the way back, so each processor sees the result of
// some serial order of all fetch-and-adds while the memory module sees fewer
// requests.
//
// Defaults: 1024 PEs (10 stages of 512 switches) with the "improved" switches
// (100-entry wait buffers, adaptive 4-slot combining queues limited to 2
// combined entries, decoupled type B), links carrying one message every 2
// cycles, and memory modules accepting one request every 4
// cycles with 2 cycles latency. A processor must not reuse a tag while a
// request with that tag is outstanding. Without contention a round trip takes
// 2*LOG2_N + MM_LATENCY cycles from request acceptance to response valid.
module ucomb_system
  import ucomb_pkg::*;
#(
  parameter int unsigned LOG2_N      = 10,
  parameter int unsigned FCQ_SLOTS   = 4,
  parameter int unsigned COMB_LIMIT  = 2,
  parameter bit          COUPLED     = 1'b0,
  parameter int unsigned WB_DEPTH    = 100,
  parameter int unsigned RQ_DEPTH    = 4,
  parameter int unsigned LINK_CYCLES = 2,
  parameter int unsigned MM_WORDS    = 256,
  parameter int unsigned MM_INTERVAL = 4,
  parameter int unsigned MM_LATENCY  = 2,
  localparam int unsigned N          = 1 << LOG2_N
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pe_req_valid [N],
  output logic        pe_req_ready [N],
  input  req_t        pe_req       [N],
  output logic        pe_rsp_valid [N],
  input  logic        pe_rsp_ready [N],
  output rsp_t        pe_rsp       [N],
  output logic [31:0] stage_combines   [LOG2_N],
  output logic [31:0] stage_decombines [LOG2_N],
  output logic [31:0] stage_adapt_full [LOG2_N],
  output logic [31:0] mm_requests      [N]      // requests served per MM
);

  logic mm_req_valid [N];
  logic mm_req_ready [N];
  req_t mm_req       [N];
  logic mm_rsp_valid [N];
  logic mm_rsp_ready [N];
  rsp_t mm_rsp       [N];

  ucomb_network #(
    .LOG2_N(LOG2_N), .FCQ_SLOTS(FCQ_SLOTS), .COMB_LIMIT(COMB_LIMIT),
    .COUPLED(COUPLED), .WB_DEPTH(WB_DEPTH), .RQ_DEPTH(RQ_DEPTH),
    .LINK_CYCLES(LINK_CYCLES)
  ) u_net (
    .clk, .rst_n,
    .pe_req_valid, .pe_req_ready, .pe_req,
    .pe_rsp_valid, .pe_rsp_ready, .pe_rsp,
    .mm_req_valid, .mm_req_ready, .mm_req,
    .mm_rsp_valid, .mm_rsp_ready, .mm_rsp,
    .stage_combines, .stage_decombines, .stage_adapt_full
  );

  for (genvar m = 0; m < N; m++) begin : g_mm
    mm #(
      .LOG2_N(LOG2_N), .WORDS(MM_WORDS), .INTERVAL(MM_INTERVAL), .LATENCY(MM_LATENCY)
    ) u_mm (
      .clk, .rst_n,
      .req_valid(mm_req_valid[m]),
      .req_ready(mm_req_ready[m]),
      .req      (mm_req[m]),
      .rsp_valid(mm_rsp_valid[m]),
      .rsp_ready(mm_rsp_ready[m]),
      .rsp      (mm_rsp[m])
    );

    always_ff @(posedge clk) begin
      if (!rst_n)                                 mm_requests[m] <= '0;
      else if (mm_req_valid[m] && mm_req_ready[m]) mm_requests[m] <= mm_requests[m] + 1;
    end
  end

endmodule
