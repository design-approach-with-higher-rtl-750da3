// mul17_b: 17 x 17 bit two's complement modified Booth multiplier with a
// 2-stage pipeline.
//
// Stage 1: booth_ppgen recodes the multiplier into nine radix-4 partial
// products (plus the negation bits) and wallace_tree compresses them with
// 4:2 carry-save adders into a sum and a carry vector, which are stored in
// pipeline registers. Stage 2: carry_chain_adder adds the two vectors and
// the 33-bit result is stored in the output register.
//
// Interface (names and widths as in the original IP): multiplicand,
// multiplier [16:0]; result [32:0]; clock; reset. The result of operands
// presented before rising edge k appears after rising edge k+1 (two clock
// edges of latency); a new operand pair may be presented every cycle.
// result is the product modulo 2^33: exact for every pair except
// (-2^16) * (-2^16), whose product needs 34 bits.
// Reset is synchronous and active high (this design's choice) and clears
// both pipeline stages.
module mul17_b #(
  parameter int unsigned N = 17
) (
  output logic [2*N-2:0] result,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  input  logic           clock,
  input  logic           reset
);

  localparam int unsigned RW   = 2 * N - 1;
  localparam int unsigned ROWS = (N + 1) / 2 + 1;

  logic [RW-1:0] rows [ROWS];
  logic [RW-1:0] tree_sum, tree_carry;
  logic [RW-1:0] sum_q, carry_q;     // stage-1 buffers (sum and carry vectors)
  logic [RW-1:0] add_s;
  logic          add_cout;

  booth_ppgen #(.N(N)) u_ppgen (
    .multiplicand(multiplicand), .multiplier(multiplier), .rows(rows));

  wallace_tree #(.W(RW), .ROWS(ROWS)) u_tree (
    .rows(rows), .sum(tree_sum), .carry(tree_carry));

  always_ff @(posedge clock) begin
    if (reset) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else begin
      sum_q   <= tree_sum;
      carry_q <= tree_carry;
    end
  end

  carry_chain_adder #(.W(RW)) u_adder (
    .a(sum_q), .b(carry_q), .cin(1'b0), .s(add_s), .cout(add_cout));

  // add_cout is the carry beyond bit 32, which modulo 2^33 is discarded.
  always_ff @(posedge clock) begin
    if (reset) result <= '0;
    else       result <= add_s;
  end

endmodule
