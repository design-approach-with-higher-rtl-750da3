// csa42: word-wide 4:2 carry-save adder (compressor).
//
// Adds four W-bit vectors into a sum vector and a carry vector with
// x1 + x2 + x3 + x4 == sum + carry (modulo 2^W). Each bit position is two
// chained full adders; the carry out of the first full adder enters the
// second full adder of the next bit position, so no carry ripples further
// than one position. Combinational. The 4:2 structure follows the original design;
// the gate-level form of the compressor is the textbook one.
module csa42 #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] x1, x2, x3, x4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] w, c_mid, c_in, c_out;

  always_comb begin
    w     = x1 ^ x2 ^ x3;
    c_mid = (x1 & x2) | (x1 & x3) | (x2 & x3);
    c_in  = {c_mid[W-2:0], 1'b0};          // first adder's carry, one position up
    sum   = w ^ x4 ^ c_in;
    c_out = (w & x4) | (w & c_in) | (x4 & c_in);
    carry = {c_out[W-2:0], 1'b0};          // second adder's carry, one position up
  end

endmodule
