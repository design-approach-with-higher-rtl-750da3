// sync_fifo: synchronous first-in first-out buffer with a valid/ready
// handshake on both sides; used as the input buffer of each farm and as the
// job queue of the result checker.
//
// DEPTH entries of type T in a circular array with read and write pointers
// and an occupancy count. in_ready is high while not full; out_valid while
// not empty. A push and a pop may happen in the same cycle, also when full
// (the pop frees the entry; in_ready still reads low then, so the producer
// waits one cycle). out_data is the oldest entry, read straight from the
// array (no extra latency): a word pushed at edge k can be popped at edge k+1.
// Reset (synchronous, active high) empties the buffer. The original design names
// the input buffer only; its depth and handshake are this design's choice.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic            push, pop;

  assign in_ready  = (count < (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // handshake rules
  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
  assert property (@(posedge clk) disable iff (rst) !(pop && count == '0));

endmodule
