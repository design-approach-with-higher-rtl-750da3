// msfarm_top: two multiplication server farms, one of paper-and-pencil
// multipliers and one of modified Booth multipliers, fed with the same
// random jobs and checked against each other.
//
// rng (AES-128 in counter mode) produces jobs. While `run` is high, a job is
// handed in the same cycle to both farms' input buffers and to the job queue
// of the comparator, and only when all three can take it, so the two farms
// always see the same job sequence. Each farm returns its results in job
// order through its reorder buffer; result_compare takes one result from each
// farm and the job from its queue and checks both against m1 * m2.
//
// Ports: rng_key and rng_ctr_init seed the generator (read at reset);
// jobs_issued, checked and mismatches count jobs; error is sticky; last_*
// show the most recent comparison. farm1_ev / farm2_ev bring out each farm's
// status pulses {wait_rob, wait_server, ooo, dispatch} (see mult_farm).
// Reset is synchronous and active high. The structure (generator, two farms
// each with input buffer, four servers and reorder buffer, compare) follows
// the original design; sizes other than the four servers per farm, the job queue and
// the handshakes are this design's choice.
module msfarm_top
  import mf_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned SERVERS   = 4,
  parameter int unsigned SLOTS     = 8,
  parameter int unsigned IN_DEPTH  = 4,
  parameter int unsigned REF_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  block_t      rng_key,
  input  block_t      rng_ctr_init,
  output logic [31:0] jobs_issued,
  output logic [31:0] checked,
  output logic [31:0] mismatches,
  output logic        error,
  output job_t        last_job,
  output product_t    last_r1,
  output product_t    last_r2,
  output logic [3:0]  farm1_ev,
  output logic [3:0]  farm2_ev
);

  // generator
  logic rng_valid, rng_ready;
  job_t rng_job;

  rng u_rng (
    .clk, .rst, .key(rng_key), .ctr_init(rng_ctr_init),
    .out_valid(rng_valid), .out_ready(rng_ready), .out_job(rng_job));

  // fork the same job to both farms and the comparator's job queue
  logic f1_in_ready, f2_in_ready, ref_in_ready, issue;

  assign issue     = run && rng_valid && f1_in_ready && f2_in_ready && ref_in_ready;
  assign rng_ready = issue;

  always_ff @(posedge clk) begin
    if (rst)        jobs_issued <= '0;
    else if (issue) jobs_issued <= jobs_issued + 32'd1;
  end

  // farms
  logic     f1_out_valid, f1_out_ready, f2_out_valid, f2_out_ready;
  product_t f1_out, f2_out;

  mult_farm #(.KIND(MULT_PENCIL), .SERVERS(SERVERS), .SLOTS(SLOTS), .IN_DEPTH(IN_DEPTH)) u_farm1 (
    .clk, .rst,
    .in_valid(issue), .in_ready(f1_in_ready), .in_job(rng_job),
    .out_valid(f1_out_valid), .out_ready(f1_out_ready), .out_data(f1_out),
    .ev_dispatch(farm1_ev[0]), .ev_ooo(farm1_ev[1]),
    .ev_wait_server(farm1_ev[2]), .ev_wait_rob(farm1_ev[3]));

  mult_farm #(.KIND(MULT_BOOTH), .SERVERS(SERVERS), .SLOTS(SLOTS), .IN_DEPTH(IN_DEPTH)) u_farm2 (
    .clk, .rst,
    .in_valid(issue), .in_ready(f2_in_ready), .in_job(rng_job),
    .out_valid(f2_out_valid), .out_ready(f2_out_ready), .out_data(f2_out),
    .ev_dispatch(farm2_ev[0]), .ev_ooo(farm2_ev[1]),
    .ev_wait_server(farm2_ev[2]), .ev_wait_rob(farm2_ev[3]));

  // job queue for the comparator
  logic ref_valid, ref_ready;
  job_t ref_job;

  sync_fifo #(.T(job_t), .DEPTH(REF_DEPTH)) u_jobq (
    .clk, .rst,
    .in_valid(issue), .in_ready(ref_in_ready), .in_data(rng_job),
    .out_valid(ref_valid), .out_ready(ref_ready), .out_data(ref_job));

  result_compare u_cmp (
    .clk, .rst,
    .job_valid(ref_valid), .job_ready(ref_ready), .job(ref_job),
    .r1_valid(f1_out_valid), .r1_ready(f1_out_ready), .r1_data(f1_out),
    .r2_valid(f2_out_valid), .r2_ready(f2_out_ready), .r2_data(f2_out),
    .checked, .mismatches, .error, .last_job, .last_r1, .last_r2);

endmodule
