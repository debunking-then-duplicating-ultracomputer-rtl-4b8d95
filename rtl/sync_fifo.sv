// Synchronous FIFO of DEPTH entries of type T, used by the reverse queues.
//
// Circular buffer with read and write pointers and an occupancy count.
// in_ready is high while the FIFO is not full and does not depend on the
// output side in the same cycle; out_valid is high while it holds an entry and
// out_data is the oldest entry. A value written in cycle t is readable from
// cycle t+1. Reset empties the FIFO.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  T                 mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] cnt;
  logic             do_wr, do_rd;

  assign in_ready  = (cnt != CNT_W'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rd_ptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      cnt <= cnt + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  // storage needs no reset: an entry is read only after it was written
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

endmodule
