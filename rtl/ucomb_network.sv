// Shuffle-exchange combining network of N = 2**LOG2_N ports.
//
// LOG2_N stages of N/2 two-by-two combining switches. Lines are numbered
// 0..N-1; PE i drives line i of the first stage, and switch j of a stage owns
// lines 2j (port 0) and 2j+1 (port 1). Output line L of a stage feeds line
// rotr(L) of the next stage (rotation right by one bit of the LOG2_N-bit line
// number), and the last stage's output line L reaches MM rotr(L). With this
// wiring the switch of stage s routes a request by bit s of its address (bit 0
// first) and a response by bit s of its PE number, and every PE reaches every
// MM on exactly one path. (This is the wiring of the eight-PE example system
// of the design description: PE1 reaches MM3 through switch 0, then switch 2,
// then switch 3, counting switches from the PE0 end.)
//
// The network adds, per PE input, the same link pacing as the switch outputs
// (one request every LINK_CYCLES cycles). It counts, per stage, the combines,
// the decombines and the cycles in which a queue refused a request only
// because of its adaptive limit; these free-running 32-bit counters are the
// network's performance counters.
//
// Timing without contention: one cycle per stage in each direction.
module ucomb_network
  import ucomb_pkg::*;
#(
  parameter int unsigned LOG2_N      = 3,
  parameter int unsigned FCQ_SLOTS   = 4,
  parameter int unsigned COMB_LIMIT  = 2,
  parameter bit          COUPLED     = 1'b0,
  parameter int unsigned WB_DEPTH    = 100,
  parameter int unsigned RQ_DEPTH    = 4,
  parameter int unsigned LINK_CYCLES = 2,
  localparam int unsigned N          = 1 << LOG2_N
) (
  input  logic        clk,
  input  logic        rst_n,
  // PE side
  input  logic        pe_req_valid [N],
  output logic        pe_req_ready [N],
  input  req_t        pe_req       [N],
  output logic        pe_rsp_valid [N],
  input  logic        pe_rsp_ready [N],
  output rsp_t        pe_rsp       [N],
  // MM side
  output logic        mm_req_valid [N],
  input  logic        mm_req_ready [N],
  output req_t        mm_req       [N],
  input  logic        mm_rsp_valid [N],
  output logic        mm_rsp_ready [N],
  input  rsp_t        mm_rsp       [N],
  // performance counters, index = stage (0 next to the PEs)
  output logic [31:0] stage_combines   [LOG2_N],
  output logic [31:0] stage_decombines [LOG2_N],
  output logic [31:0] stage_adapt_full [LOG2_N]
);

  localparam int unsigned LC_W = (LINK_CYCLES > 1) ? $clog2(LINK_CYCLES) : 1;
  localparam int unsigned EV_W = $clog2(N + 1);

  function automatic int unsigned rotr(int unsigned l);
    return (l >> 1) | ((l & 1) << (LOG2_N - 1));
  endfunction

  // signals on the line boundaries: boundary 0 at the PEs, LOG2_N at the MMs
  logic f_valid [LOG2_N+1][N];
  logic f_ready [LOG2_N+1][N];
  req_t f_req   [LOG2_N+1][N];
  logic r_valid [LOG2_N+1][N];
  logic r_ready [LOG2_N+1][N];
  rsp_t r_rsp   [LOG2_N+1][N];

  logic ev_comb  [LOG2_N][N];
  logic ev_dcomb [LOG2_N][N];
  logic ev_ablk  [LOG2_N][N];

  // PE ports with ingress pacing
  for (genvar i = 0; i < N; i++) begin : g_pe
    logic [LC_W-1:0] gap;
    assign f_valid[0][i] = pe_req_valid[i] && (gap == '0);
    assign pe_req_ready[i] = f_ready[0][i] && (gap == '0);
    assign f_req[0][i] = pe_req[i];
    assign pe_rsp_valid[i] = r_valid[0][i];
    assign r_ready[0][i] = pe_rsp_ready[i];
    assign pe_rsp[i] = r_rsp[0][i];
    always_ff @(posedge clk) begin
      if (!rst_n)                               gap <= '0;
      else if (f_valid[0][i] && f_ready[0][i])  gap <= LC_W'(LINK_CYCLES - 1);
      else if (gap != '0)                       gap <= gap - 1'b1;
    end
  end

  // MM ports
  for (genvar m = 0; m < N; m++) begin : g_mm
    assign mm_req_valid[m] = f_valid[LOG2_N][m];
    assign f_ready[LOG2_N][m] = mm_req_ready[m];
    assign mm_req[m] = f_req[LOG2_N][m];
    assign r_valid[LOG2_N][m] = mm_rsp_valid[m];
    assign mm_rsp_ready[m] = r_ready[LOG2_N][m];
    assign r_rsp[LOG2_N][m] = mm_rsp[m];
  end

  for (genvar s = 0; s < LOG2_N; s++) begin : g_stage
    for (genvar j = 0; j < N / 2; j++) begin : g_sw
      logic fin_valid [2], fin_ready [2];  req_t fin_req [2];
      logic rout_valid[2], rout_ready[2];  rsp_t rout_rsp[2];
      logic fout_valid[2], fout_ready[2];  req_t fout_req[2];
      logic rin_valid [2], rin_ready [2];  rsp_t rin_rsp [2];
      logic e_comb [2], e_dcomb [2], e_ablk [2];

      for (genvar p = 0; p < 2; p++) begin : g_port
        localparam int unsigned LIN  = 2 * j + p;
        localparam int unsigned LOUT = rotr(2 * j + p);
        // PE side of this switch: boundary s, line LIN
        assign fin_valid[p]         = f_valid[s][LIN];
        assign f_ready[s][LIN]      = fin_ready[p];
        assign fin_req[p]           = f_req[s][LIN];
        assign r_valid[s][LIN]      = rout_valid[p];
        assign rout_ready[p]        = r_ready[s][LIN];
        assign r_rsp[s][LIN]        = rout_rsp[p];
        // MM side: boundary s+1, line rotr(LIN)
        assign f_valid[s+1][LOUT]   = fout_valid[p];
        assign fout_ready[p]        = f_ready[s+1][LOUT];
        assign f_req[s+1][LOUT]     = fout_req[p];
        assign rin_valid[p]         = r_valid[s+1][LOUT];
        assign r_ready[s+1][LOUT]   = rin_ready[p];
        assign rin_rsp[p]           = r_rsp[s+1][LOUT];
        assign ev_comb[s][LIN]      = e_comb[p];
        assign ev_dcomb[s][LIN]     = e_dcomb[p];
        assign ev_ablk[s][LIN]      = e_ablk[p];
      end

      comb_switch #(
        .STAGE(s), .FCQ_SLOTS(FCQ_SLOTS), .COMB_LIMIT(COMB_LIMIT),
        .COUPLED(COUPLED), .WB_DEPTH(WB_DEPTH), .RQ_DEPTH(RQ_DEPTH),
        .LINK_CYCLES(LINK_CYCLES)
      ) u_sw (
        .clk, .rst_n,
        .fin_valid, .fin_ready, .fin_req,
        .rout_valid, .rout_ready, .rout_rsp,
        .fout_valid, .fout_ready, .fout_req,
        .rin_valid, .rin_ready, .rin_rsp,
        .ev_combine(e_comb), .ev_decombine(e_dcomb), .ev_adapt_block(e_ablk)
      );
    end

    // per-stage event counters
    logic [EV_W-1:0] n_comb, n_dcomb, n_ablk;
    always_comb begin
      n_comb  = '0;
      n_dcomb = '0;
      n_ablk  = '0;
      for (int l = 0; l < N; l++) begin
        n_comb  += EV_W'(ev_comb[s][l]);
        n_dcomb += EV_W'(ev_dcomb[s][l]);
        n_ablk  += EV_W'(ev_ablk[s][l]);
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        stage_combines[s]   <= '0;
        stage_decombines[s] <= '0;
        stage_adapt_full[s] <= '0;
      end else begin
        stage_combines[s]   <= stage_combines[s]   + 32'(n_comb);
        stage_decombines[s] <= stage_decombines[s] + 32'(n_dcomb);
        stage_adapt_full[s] <= stage_adapt_full[s] + 32'(n_ablk);
      end
    end
  end

endmodule
