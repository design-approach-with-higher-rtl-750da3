// tb_aes_core: encrypts published AES-128 test vectors (FIPS-197 C.1 and
// B, SP 800-38A ECB, the all-zero vector) and checks the cipher text and
// that done rises ten rising edges after the edge that sampled ld. Also
// restarts an encryption with ld while one is running.
module tb_aes_core;
  import aes_pkg::*;
  logic clk = 0, rst, ld, done;
  block_t key, text_in, text_out;
  int checks = 0, failures = 0;

  aes_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input block_t k, input block_t pt, input block_t ct);
    int edges;
    ld = 1; key = k; text_in = pt;
    @(posedge clk);
    #1 ld = 0; key = '0; text_in = '0;
    edges = 0;
    while (!done && edges < 30) begin @(posedge clk); #1 edges++; end
    checks += 2;
    if (edges != 10) begin failures++; $display("FAIL done after %0d edges", edges); end
    if (text_out !== ct) begin failures++; $display("FAIL %h -> %h expected %h", pt, text_out, ct); end
    @(posedge clk);
    #1;
    checks++;
    if (done || text_out !== ct) begin failures++; $display("FAIL done not a pulse or text_out not held"); end
  endtask

  initial begin
    rst = 1; ld = 0; key = '0; text_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
            128'h3ad77bb40d7a3660a89ecaf32466ef97);
    encrypt(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    // restart: ld in the middle of an encryption
    ld = 1; key = 128'h1; text_in = 128'h2;
    @(posedge clk);
    #1 ld = 0;
    repeat (4) @(posedge clk);
    #1;
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
            128'hf5d3d58503b9699de785895a96fdbaaf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
