// tb_booth_ppgen: checks the Booth partial products: the ten rows must add
// up to A * B modulo 2^33 for 17-bit two's complement A and B (corner values,
// then random), and each of the nine Booth rows must hold one of the five
// allowed multiples of A in its position.
module tb_booth_ppgen;
  localparam int N = 17, RW = 33, ROWS = 10;
  logic [N-1:0]  a, b;
  logic [RW-1:0] rows [ROWS];
  int checks = 0, failures = 0;

  booth_ppgen dut (.multiplicand(a), .multiplier(b), .rows);

  task automatic try(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [RW-1:0] acc;
    logic signed [RW-1:0] exp;
    a = x; b = y;
    #1;
    acc = '0;
    for (int r = 0; r < ROWS; r++) acc += rows[r];
    exp = RW'($signed(x)) * RW'($signed(y));
    checks++;
    if (acc !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL %0d * %0d: rows add to %h, expected %h",
                                 $signed(x), $signed(y), acc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corners [6] = '{17'h00000, 17'h00001, 17'h1ffff, 17'h0ffff, 17'h10000, 17'h10001};
    foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j]);
    for (int i = 0; i < 3000; i++) try(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
