// booth_ppgen: partial-product generation block of the modified Booth
// multiplier (radix-4 Booth encoder plus multiplicand selection).
//
// The 17-bit two's complement multiplier B is scanned in overlapping groups
// of three bits {B[2i+1], B[2i], B[2i-1]} (B[-1] = 0, B[17] = B[16]), giving
// nine digits in {-2, -1, 0, +1, +2}. For each digit the block selects 0, A or
// 2A (2A by a one-bit shift) and, for a negative digit, inverts the selection
// and raises a "neg" bit that the adder tree adds at the row's least
// significant position (two's complement = inversion + 1).
//
// Sign extension is avoided with the sign-generation method: instead of
// extending each 18-bit row to the full 33 bits, row 0 carries
// {~s0, s0, s0} above its 17 low bits and every later row carries {1, ~si};
// together these constant and inverted-sign bits equal the sign extensions
// modulo 2^33. The neg bit of row i is placed in row i+1 two positions below
// that row's own bits, where the row is otherwise empty; the neg bit of the
// last row goes into a tenth row. Output: ten 33-bit rows already aligned to
// their weights; their sum modulo 2^33 is A*B.
//
// Purely combinational. The original design gives the Booth recoding, the
// shift/inversion selection, nine partial products and the sign-generation
// method; the row layout of the neg bits and the tenth row are this design's
// own choices. The original design's nMOS pass-transistor multiplexers are a circuit
// technique; here the selection is an ordinary multiplexer.
module booth_ppgen #(
  parameter int unsigned N    = 17,              // operand width (two's complement)
  parameter int unsigned RW   = 2 * N - 1,       // row width = result width
  parameter int unsigned NPP  = (N + 1) / 2,     // number of Booth partial products
  parameter int unsigned ROWS = NPP + 1          // partial products + last neg row
) (
  input  logic [N-1:0]  multiplicand,  // A
  input  logic [N-1:0]  multiplier,    // B
  output logic [RW-1:0] rows [ROWS]
);

  // {B[N-1] (sign copy), B, 0}: group i is b_sh[2i+2:2i], the appended 0 is B[-1]
  logic [N+1:0] b_sh;
  assign b_sh = {multiplier[N-1], multiplier, 1'b0};

  always_comb begin
    logic [2:0]   grp;
    logic         neg, one, two;
    logic [N:0]   a_ext;   // sign-extended A (N+1 bits)
    logic [N:0]   sel;     // selected multiple of A, N+1 bits
    logic         s;
    logic [RW:0]  row;     // one bit wider so a shifted row can be trimmed
    logic [NPP-1:0] negs;

    a_ext = {multiplicand[N-1], multiplicand};
    for (int r = 0; r < ROWS; r++) rows[r] = '0;
    negs = '0;

    for (int i = 0; i < NPP; i++) begin
      grp = b_sh[2*i+:3];
      // Booth encoder: digit = -2*b2 + b1 + b0
      neg = grp[2] & ~(grp[1] & grp[0]);
      one = grp[1] ^ grp[0];
      two = (grp == 3'b011) || (grp == 3'b100);
      // selection: +-1A by the value itself, +-2A by a shift, negation by inversion
      sel = one ? a_ext : (two ? {a_ext[N-1:0], 1'b0} : '0);
      if (neg) sel = ~sel;
      negs[i] = neg;
      s = sel[N];
      row = '0;
      if (i == 0) row[N+2:0] = {~s, s, s, sel[N-1:0]};
      else        row[N+1:0] = {1'b1, ~s, sel[N-1:0]};
      row = row << (2 * i);
      if (i > 0) row[2*i-2] = negs[i-1];
      rows[i] = row[RW-1:0];
    end
    rows[NPP] = '0;
    rows[NPP][2*(NPP-1)] = negs[NPP-1];
  end

endmodule
