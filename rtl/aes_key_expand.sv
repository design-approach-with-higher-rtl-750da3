// aes_key_expand: AES-128 key expansion that produces one round key per
// cycle, on the fly.
//
// load stores the cipher key as the current round key (round key 0) and
// sets the round constant to 8'h01. Each cycle with `step` high replaces the
// current round key by the next one and doubles the round constant in
// GF(2^8). next_key is the round key after the current one, available
// combinationally so the cipher can use round key r in the cycle that
// computes round r. Reset (synchronous, active high) clears the registers.
// The original design shows a key expansion block feeding every permutation stage;
// the on-the-fly form is this design's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  block_t key,
  input  logic   step,
  output block_t cur_key,
  output block_t next_key
);

  logic [7:0] rcon;

  assign next_key = next_round_key(cur_key, rcon);

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_key <= '0;
      rcon    <= 8'h01;
    end else if (load) begin
      cur_key <= key;
      rcon    <= 8'h01;
    end else if (step) begin
      cur_key <= next_key;
      rcon    <= xtime(rcon);
    end
  end

endmodule
