// Memory module (MM) with a fetch-and-add adder.
//
// Addresses are interleaved over the MMs: the low LOG2_N address bits name the
// MM (and steer the request through the network), the next bits index a word
// here. A fetch-and-add returns the word's old value and stores old + addend in
// one step, so fetch-and-adds on one word are atomic; a (combined) request
// carrying the sum e+f is served exactly like one with addend e+f. A store
// returns the old value and writes the data.
//
// Timing: one request is accepted at most every INTERVAL cycles; its response
// is offered LATENCY cycles after acceptance and held until taken. While a
// response waits, no further request is accepted. Defaults follow the
// simulated system of the design description: accept every 4 cycles, 2 cycles
// latency (40 and 38 model a modern DRAM-like memory). WORDS, the reset of the
// whole array to zero and the single response register are own choices.
module mm
  import ucomb_pkg::*;
#(
  parameter int unsigned LOG2_N   = 3,
  parameter int unsigned WORDS    = 256,
  parameter int unsigned INTERVAL = 4,
  parameter int unsigned LATENCY  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  output logic req_ready,
  input  req_t req,
  output logic rsp_valid,
  input  logic rsp_ready,
  output rsp_t rsp
);

  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned CD_W  = $clog2(INTERVAL + 1);
  localparam int unsigned LT_W  = $clog2(LATENCY + 1);

  logic [DATA_W-1:0] mem [WORDS];
  logic [CD_W-1:0]   cooldown;   // cycles until the next request may be accepted
  logic [LT_W-1:0]   lat;        // cycles until the held response is offered
  logic              pend;       // a response is held
  logic [IDX_W-1:0]  widx;
  logic              do_acc;

  assign widx      = req.addr[LOG2_N +: IDX_W];
  assign req_ready = (cooldown == '0) && !pend;
  assign do_acc    = req_valid && req_ready;
  assign rsp_valid = pend && (lat == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cooldown <= '0;
      lat      <= '0;
      pend     <= 1'b0;
      rsp      <= '0;
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else begin
      if (cooldown != '0) cooldown <= cooldown - 1'b1;
      if (lat != '0)      lat      <= lat - 1'b1;
      if (rsp_valid && rsp_ready) pend <= 1'b0;
      if (do_acc) begin
        cooldown <= CD_W'(INTERVAL - 1);
        lat      <= LT_W'(LATENCY - 1);
        pend     <= 1'b1;
        rsp.id   <= req.id;
        rsp.data <= mem[widx];
        if (req.op == OP_FAA) mem[widx] <= mem[widx] + req.data;
        else                  mem[widx] <= req.data;
      end
    end
  end

  initial begin
    assert (LATENCY >= 1 && INTERVAL >= 1) else $error("mm: LATENCY and INTERVAL must be at least 1");
    assert (LOG2_N + IDX_W <= ADDR_W) else $error("mm: address too narrow for WORDS");
  end

endmodule
