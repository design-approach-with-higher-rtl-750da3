// booth_server: multiplication server built around the mul17_b Booth
// multiplier, with the start/result behaviour of its wrapper.
//
// start takes a job (two 16-bit unsigned operands) and its tag; both
// operands are zero-extended to 17 bits so that the two's complement core
// multiplies them as positive numbers, and the low 32 bits of its 33-bit
// result are the product. The core is always enabled (start is always
// ready), so a job may start every cycle. A valid bit and the tag travel
// beside the two pipeline stages: result_valid, result_tag and result_data
// appear two rising edges after the edge that accepted the job. Reset
// (synchronous, active high) clears the valid pipeline. The start/result
// method pair follows the original design's IP wrapper; the tag pipeline and operand
// extension are this design's choice.
module booth_server
  import mf_pkg::*;
#(
  parameter int unsigned TAG_W = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_valid,
  output logic             start_ready,
  input  job_t             start_job,
  input  logic [TAG_W-1:0] start_tag,
  output logic             result_valid,
  output logic [TAG_W-1:0] result_tag,
  output product_t         result_data
);

  localparam int unsigned N = OP_W + 1;

  logic [2*N-2:0]   core_result;
  logic [1:0]       vld_q;
  logic [TAG_W-1:0] tag_q [2];

  assign start_ready = 1'b1;

  mul17_b #(.N(N)) u_mul (
    .result      (core_result),
    .multiplicand({1'b0, start_job.m1}),
    .multiplier  ({1'b0, start_job.m2}),
    .clock       (clk),
    .reset       (rst)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      vld_q <= '0;
      tag_q <= '{default: '0};
    end else begin
      vld_q    <= {vld_q[0], start_valid};
      tag_q[0] <= start_tag;
      tag_q[1] <= tag_q[0];
    end
  end

  assign result_valid = vld_q[1];
  assign result_tag   = tag_q[1];
  assign result_data  = core_result[PROD_W-1:0];

endmodule
