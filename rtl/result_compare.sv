// result_compare: checks the two farms against each other and against the
// product of the job's operands.
//
// The job queue (job_*) holds every job given to the farms, in order; the
// farms return their results (r1_*, r2_*) in the same order. When all three
// are valid the comparator takes one of each in the same cycle and checks
// r1 == r2 == m1 * m2. It counts checked jobs and mismatches, keeps the last
// job and both results for display, and raises `error` (sticky) after a
// mismatch. Counters update on the edge that takes the three values. Reset
// (synchronous, active high) clears them. The original design's comparison of both
// farms' results with the expected product follows its test output; the
// counters and the sticky flag are this design's choice.
module result_compare
  import mf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        job_valid,
  output logic        job_ready,
  input  job_t        job,
  input  logic        r1_valid,
  output logic        r1_ready,
  input  product_t    r1_data,
  input  logic        r2_valid,
  output logic        r2_ready,
  input  product_t    r2_data,
  output logic [31:0] checked,
  output logic [31:0] mismatches,
  output logic        error,
  output job_t        last_job,
  output product_t    last_r1,
  output product_t    last_r2
);

  logic     take;
  product_t expected;

  assign take      = job_valid && r1_valid && r2_valid;
  assign job_ready = take;
  assign r1_ready  = take;
  assign r2_ready  = take;
  assign expected  = PROD_W'(job.m1) * PROD_W'(job.m2);

  always_ff @(posedge clk) begin
    if (rst) begin
      checked    <= '0;
      mismatches <= '0;
      error      <= 1'b0;
      last_job   <= '0;
      last_r1    <= '0;
      last_r2    <= '0;
    end else if (take) begin
      checked  <= checked + 32'd1;
      last_job <= job;
      last_r1  <= r1_data;
      last_r2  <= r2_data;
      if (r1_data != expected || r2_data != expected) begin
        mismatches <= mismatches + 32'd1;
        error      <= 1'b1;
      end
    end
  end

endmodule
