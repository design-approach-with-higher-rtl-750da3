// rr_arbiter: round-robin arbiter that picks which free server of a farm
// receives the next job.
//
// req[i] is high when requester i (a server) can take a job. grant is
// one-hot (or zero when nothing requests) and chooses the first requester
// at or after the rotating priority pointer. When `advance` is high (the
// grant was used) the pointer moves to the position after the granted one,
// so that jobs spread over all free servers. grant is combinational from req
// and the pointer; the pointer updates on the rising edge. Reset
// (synchronous, active high) points at requester 0. The original design says the
// arbiter hands each job to any server that is available; the round-robin
// order is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [N-1:0]                 req,
  input  logic                         advance,
  output logic [N-1:0]                 grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic                         any
);

  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;

  always_comb begin
    logic [IW-1:0] idx;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = IW'((int'(ptr) + k) % N);
      if (!any && req[idx]) begin
        any       = 1'b1;
        grant_idx = idx;
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && any) ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  assert property (@(posedge clk) disable iff (rst) (grant & ~req) == '0);

endmodule
