// rng: random job generator built on the AES-128 core in counter mode.
//
// The core encrypts successive values of a 128-bit counter under a fixed
// key; cipher text behaves as random data. After reset the counter starts at
// ctr_init. Each 128-bit cipher block is cut into four 32-bit words, most
// significant word first, and each word is one job: m1 = word[31:16],
// m2 = word[15:0]. The jobs leave through a valid/ready handshake.
//
// One block is held for output while the core already encrypts the next
// counter value, and a finished block waits in a second register until the
// output side has sent all four words of the previous one. With a consumer
// that is always ready the generator gives four jobs per AES block, four jobs
// every thirteen cycles. Reset (synchronous, active high) restarts
// from ctr_init. The original design uses AES encryption as the random number
// source; the counter mode, the key and counter inputs and the word split
// are this design's choice.
module rng
  import mf_pkg::*;
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t key,
  input  block_t ctr_init,
  output logic   out_valid,
  input  logic   out_ready,
  output job_t   out_job
);

  block_t     ctr;
  logic       aes_ld, aes_done, aes_busy;
  block_t     aes_out;
  block_t     pend;          // finished block waiting for the output register
  logic       pend_valid;
  block_t     obuf;          // block being sent, word 0 in bits [127:96]
  logic [2:0] words_left;

  assign aes_ld = !aes_busy && !pend_valid && !rst;

  aes_core u_aes (
    .clk, .rst, .ld(aes_ld), .key, .text_in(ctr),
    .done(aes_done), .text_out(aes_out));

  assign out_valid = (words_left != '0);
  assign out_job   = job_t'(obuf[127:96]);

  always_ff @(posedge clk) begin
    if (rst) begin
      ctr        <= ctr_init;
      aes_busy   <= 1'b0;
      pend       <= '0;
      pend_valid <= 1'b0;
      obuf       <= '0;
      words_left <= '0;
    end else begin
      if (aes_ld) begin
        aes_busy <= 1'b1;
        ctr      <= ctr + 128'd1;
      end
      if (aes_done) begin
        aes_busy   <= 1'b0;
        pend       <= aes_out;
        pend_valid <= 1'b1;
      end
      // output register: send one word per handshake, refill from pend
      if (out_valid && out_ready) begin
        obuf       <= {obuf[95:0], 32'h0};
        words_left <= words_left - 3'd1;
      end
      if ((words_left == '0 || (words_left == 3'd1 && out_ready)) && pend_valid && !aes_done) begin
        obuf       <= pend;
        words_left <= 3'd4;
        pend_valid <= 1'b0;
      end
    end
  end

endmodule
