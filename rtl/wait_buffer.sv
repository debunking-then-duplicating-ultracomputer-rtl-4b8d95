// Wait buffer: decombining store of one switch output.
//
// Every combine in the forward queue of this output writes a record
// {key, second, e}: `key` is the identity of the request that went on towards
// memory, `second` the identity of the request merged into it, and e the
// addend the surviving request carried before the merge. Responses coming back
// from memory through this output pass the buffer, which searches all entries
// for the response's identity at once. Without a match the response passes
// unchanged. With a match the entry is removed, the response passes unchanged
// (value X, for `key`) and in the next cycle a second response with value X+e
// for `second` is issued; the input is held off during that cycle.
//
// Interface: write port ins_valid/ins_entry (the writer checks `room` first),
// response input and output with valid/ready. The pass-through is
// combinational; the queue behind the output provides the register stage.
//
// From the design description: associative search with removal of the match,
// an adder forming X+e, 100 entries (8 in the original switch). Own choices:
// the record layout, issuing the two responses in consecutive cycles, first
// free slot for insertion.
module wait_buffer
  import ucomb_pkg::*;
#(
  parameter int unsigned DEPTH = 100
) (
  input  logic      clk,
  input  logic      rst_n,
  // insertion from the forward combining queue
  input  logic      ins_valid,
  input  wb_entry_t ins_entry,
  output logic      room,
  // responses from the memory side
  input  logic      in_valid,
  output logic      in_ready,
  input  rsp_t      in_rsp,
  // responses towards the reverse queue
  output logic      out_valid,
  input  logic      out_ready,
  output rsp_t      out_rsp,
  // events
  output logic      ev_decombine
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic      [DEPTH-1:0] vld;
  wb_entry_t             ent [DEPTH];

  logic                  pend_valid;
  rsp_t                  pend_rsp;

  logic                  hit;
  logic      [IDX_W-1:0] hidx;
  logic                  free_found;
  logic      [IDX_W-1:0] fidx;

  // associative search on the response identity
  always_comb begin
    hit  = 1'b0;
    hidx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (vld[i] && ent[i].key == in_rsp.id) begin
        hit  = 1'b1;
        hidx = IDX_W'(i);
      end
    end
  end

  // first free slot
  always_comb begin
    free_found = 1'b0;
    fidx       = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!vld[i]) begin
        free_found = 1'b1;
        fidx       = IDX_W'(i);
      end
    end
  end
  assign room = free_found;

  assign out_valid    = pend_valid || in_valid;
  assign out_rsp      = pend_valid ? pend_rsp : in_rsp;
  assign in_ready     = !pend_valid && out_ready;
  assign ev_decombine = in_valid && in_ready && hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld        <= '0;
      pend_valid <= 1'b0;
      pend_rsp   <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      if (pend_valid && out_ready) pend_valid <= 1'b0;
      if (ev_decombine) begin
        vld[hidx]     <= 1'b0;
        pend_valid    <= 1'b1;
        pend_rsp.id   <= ent[hidx].second;
        pend_rsp.data <= in_rsp.data + ent[hidx].addend;
      end
      if (ins_valid && free_found) begin
        vld[fidx] <= 1'b1;
        ent[fidx] <= ins_entry;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(ins_valid && !free_found))
    else $error("wait_buffer: insertion while full");

endmodule
