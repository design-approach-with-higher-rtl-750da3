// tb_wallace_tree: checks that the 4:2 CSA tree keeps the sum of its ten
// input rows: sum + carry must equal the sum of the rows modulo 2^33.
module tb_wallace_tree;
  localparam int W = 33;
  logic [W-1:0] rows [10];
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;

  wallace_tree dut (.rows, .sum, .carry);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int t = 0; t < 3000; t++) begin
      exp = '0;
      for (int r = 0; r < 10; r++) begin
        case (t)
          0:       rows[r] = '0;
          1:       rows[r] = '1;
          default: rows[r] = W'({$urandom, $urandom} >> (31 + (t % 3 == 0 ? $urandom_range(0, 20) : 0)));
        endcase
        exp += rows[r];
      end
      #1;
      checks++;
      if (W'(sum + carry) !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL sum+carry=%h expected %h", W'(sum + carry), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
