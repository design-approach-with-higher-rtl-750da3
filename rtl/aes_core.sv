// aes_core: iterative AES-128 encryption core, one round per clock cycle.
//
// Interface (signal names as in the original design's block diagram): ld, key,
// text_in, done, text_out, plus clk and rst. A cycle with ld high starts an
// encryption: the initial permutation (AddRoundKey with the cipher key) is
// stored in the state register and the key expansion is loaded. The next
// nine cycles each apply a round permutation (SubBytes, ShiftRows,
// MixColumns, AddRoundKey); the tenth applies the final permutation, which
// leaves out MixColumns. done is high for the one cycle after that tenth
// round: it rises ten rising edges after the edge that sampled ld, i.e. a
// block every eleven cycles when ld follows done. text_out holds the cipher
// text until the next ld. An ld during an encryption restarts it with the new
// inputs. Reset (synchronous, active high) idles the core.
// The original design reuses an existing AES core and gives its block diagram
// (control, key expansion, initial, round and final permutation) and ports;
// the one-round-per-cycle structure is this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ld,
  input  block_t key,
  input  block_t text_in,
  output logic   done,
  output block_t text_out
);

  block_t     state;
  logic [3:0] round;     // round to be computed next, 1..10
  logic       busy;
  block_t     rk_next;
  block_t     after_sub_shift, round_out;

  aes_key_expand u_kexp (
    .clk, .rst, .load(ld), .key, .step(busy && !ld),
    .cur_key(), .next_key(rk_next));

  always_comb begin
    after_sub_shift = sub_shift(state);
    if (round == 4'd10) round_out = after_sub_shift ^ rk_next;               // final
    else                round_out = mix_columns(after_sub_shift) ^ rk_next;  // round
  end

  // control
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0;
      round <= 4'd1;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ld) begin
        state <= text_in ^ key;   // initial permutation
        round <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        state <= round_out;
        if (round == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign text_out = state;

endmodule
