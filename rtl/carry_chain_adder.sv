// carry_chain_adder: W-bit ripple (carry chain) adder, the final adder of
// the Booth multiplier.
//
// A chain of full adders: bit i adds a[i], b[i] and the carry from bit i-1;
// the carry into bit 0 is cin. Returns the W-bit sum and the carry out.
// Combinational. The carry chain adder cell and the 33-bit width follow the
// original design.
module carry_chain_adder #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
