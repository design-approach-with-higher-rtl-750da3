// tb_rr_arbiter: random request patterns; checks that the grant is one-hot,
// goes to a requester, and is the first requester at or after the position
// following the last used grant (round robin).
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst;
  logic [N-1:0] req, grant;
  logic [1:0] grant_idx;
  logic advance, any;
  int checks = 0, failures = 0;

  rr_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr = 0;
    rst = 1; req = '0; advance = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int exp_idx;
      req = N'($urandom);
      if (i % 7 == 0) req = '1;
      advance = $urandom_range(0, 3) != 0;
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if (exp_idx < 0) begin
        if (grant !== '0 || any) begin failures++; $display("FAIL grant without request"); end
      end else if (grant !== N'(1 << exp_idx) || grant_idx !== 2'(exp_idx) || !any) begin
        failures++;
        if (failures < 5) $display("FAIL req %b ptr %0d grant %b expected idx %0d", req, ptr, grant, exp_idx);
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % N;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
