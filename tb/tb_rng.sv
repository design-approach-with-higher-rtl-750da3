// tb_rng: checks the generator's job stream against AES-128 cipher text of
// known counter values (FIPS-197 C.1, FIPS-197 B, and the all-zero key with
// counters 0, 1 and 2 as used in the published GCM test cases), including the
// word order and the counter increment, with an output side that is ready
// only now and then; then checks the rate with an always-ready consumer.
module tb_rng;
  import mf_pkg::*;
  import aes_pkg::*;
  logic clk = 0, rst, out_valid, out_ready;
  block_t key, ctr_init;
  job_t out_job;
  int checks = 0, failures = 0;

  rng dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart(input block_t k, input block_t c);
    rst = 1; key = k; ctr_init = c; out_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  task automatic expect_block(input block_t b, input bit sometimes_ready);
    for (int w = 0; w < 4; w++) begin
      out_ready = sometimes_ready ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      while (!(out_valid && out_ready)) begin
        @(posedge clk);
        #1 out_ready = sometimes_ready ? ($urandom_range(0, 2) == 0) : 1'b1;
        #1;
      end
      checks++;
      if (out_job !== job_t'(b[127 - 32*w -: 32])) begin
        failures++; $display("FAIL word %0d: %h expected %h", w, out_job, b[127 - 32*w -: 32]);
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int start_t, words;
    restart(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    expect_block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    restart(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    expect_block(128'h3925841d02dc09fbdc118597196a0b32, 1);
    restart(128'h0, 128'h0);
    expect_block(128'h66e94bd4ef8a2c3b884cfa59ca342b2e, 1);
    expect_block(128'h58e2fccefa7e3061367f1d57a4e7455a, 1);
    expect_block(128'h0388dace60b6a392f328c2b971b2fe78, 0);
    // rate: always ready, count jobs over 240 cycles; four per 13 cycles expected
    #1 out_ready = 1;
    words = 0;
    for (int c = 0; c < 240; c++) begin
      @(posedge clk);
      if (out_valid) words++;
    end
    checks++;
    if (words < 70) begin failures++; $display("FAIL only %0d jobs in 240 cycles", words); end
    $display("%0d jobs in 240 cycles", words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
