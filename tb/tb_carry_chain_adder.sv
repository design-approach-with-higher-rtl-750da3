// tb_carry_chain_adder: checks the 33-bit carry chain adder against the
// sum computed with the `+` operator, for corner values and random inputs.
module tb_carry_chain_adder;
  localparam int W = 33;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  carry_chain_adder dut (.a, .b, .cin, .s, .cout);

  task automatic try(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, expected %h", x, y, ci, {cout, s}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try('0, '0, 1'b0);
    try('1, '0, 1'b1);
    try('1, '1, 1'b1);
    try({1'b1, 32'h0}, {1'b1, 32'h0}, 1'b0);
    for (int i = 0; i < 2000; i++)
      try({$urandom, $urandom} >> 31, {$urandom, $urandom} >> 31, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
