// pencil_server: paper-and-pencil (shift-and-add) multiplication server
// whose time per job depends on the operands.
//
// A job (m1, m2, tag) is accepted with start_valid && start_ready; the
// server is ready only while idle. Each following cycle handles one bit of
// the multiplier m2, least significant first: the shifted multiplicand is
// added to the partial product when the bit is 1, then the multiplicand
// shifts left and the multiplier right. The job ends as soon as the
// remaining multiplier bits are all zero, so a job takes max(1, bit length
// of m2) working cycles: result_valid pulses for one cycle, with the product
// and the job's tag, max(1, bit length of m2) + 1 rising edges after the
// edge that accepted the job; the server is ready again in that same cycle. Reset (synchronous, active high) makes the server
// idle. The original design names paper-and-pencil multipliers whose time depends
// on the operands; the one-bit-per-cycle datapath and early end are this
// design's reading of that.
module pencil_server
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

  logic             busy;
  product_t         acc, mcand;
  operand_t         mplier;
  logic [TAG_W-1:0] tag_q;

  assign start_ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy         <= 1'b0;
      result_valid <= 1'b0;
      acc          <= '0;
      mcand        <= '0;
      mplier       <= '0;
      tag_q        <= '0;
      result_tag   <= '0;
      result_data  <= '0;
    end else begin
      result_valid <= 1'b0;
      if (!busy) begin
        if (start_valid) begin
          busy   <= 1'b1;
          acc    <= '0;
          mcand  <= PROD_W'(start_job.m1);
          mplier <= start_job.m2;
          tag_q  <= start_tag;
        end
      end else begin
        product_t acc_n;
        acc_n  = mplier[0] ? acc + mcand : acc;
        acc    <= acc_n;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        if ((mplier >> 1) == '0) begin
          busy         <= 1'b0;
          result_valid <= 1'b1;
          result_tag   <= tag_q;
          result_data  <= acc_n;
        end
      end
    end
  end

endmodule
