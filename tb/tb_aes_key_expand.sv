// tb_aes_key_expand: loads the FIPS-197 Appendix A.1 cipher key and checks
// all ten round keys, one per step, against the standard's key schedule.
module tb_aes_key_expand;
  import aes_pkg::*;
  logic clk = 0, rst, load, step;
  block_t key, cur_key, next_key;
  int checks = 0, failures = 0;

  aes_key_expand dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t rk [11] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};

  initial begin
    rst = 1; load = 0; step = 0; key = '0;
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      #1 rst = 0; load = 1; key = rk[0];
      @(posedge clk);
      #1 load = 0; key = '0;
      for (int r = 0; r < 10; r++) begin
        checks += 2;
        if (cur_key !== rk[r]) begin failures++; $display("FAIL round key %0d: %h", r, cur_key); end
        if (next_key !== rk[r+1]) begin failures++; $display("FAIL next key %0d: %h", r + 1, next_key); end
        // hold for a cycle now and then: the key must not move without step
        if (r == 3) begin @(posedge clk); #1; end
        step = 1;
        @(posedge clk);
        #1 step = 0;
      end
      checks++;
      if (cur_key !== rk[10]) begin failures++; $display("FAIL last round key %h", cur_key); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
