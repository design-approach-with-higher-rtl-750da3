// tb_mul17_b: streams a new operand pair into the Booth multiplier every
// cycle and checks each result two rising edges later against the signed
// product modulo 2^33, which also checks the 2-cycle latency and the
// one-pair-per-cycle rate. Reset must clear the result register.
module tb_mul17_b;
  localparam int N = 17;
  logic clock = 0, reset;
  logic [N-1:0]   mcand, mplier;
  logic [2*N-2:0] result;
  int checks = 0, failures = 0;

  mul17_b dut (.result, .multiplicand(mcand), .multiplier(mplier), .clock, .reset);

  always #5 clock = ~clock;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-2:0] exp [$];
    reset = 1; mcand = '0; mplier = '0;
    repeat (2) @(posedge clock);
    #1;
    checks++;
    if (result !== '0) begin failures++; $display("FAIL result not cleared by reset"); end
    reset = 0;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin mcand = 17'h0ffff; mplier = 17'h0ffff; end
        1: begin mcand = 17'h10000; mplier = 17'h00001; end
        2: begin mcand = 17'h1ffff; mplier = 17'h1ffff; end
        3: begin mcand = 17'd1101;  mplier = 17'd49702; end
        default: begin mcand = N'($urandom); mplier = N'($urandom); end
      endcase
      exp.push_back((2*N-1)'($signed(mcand)) * (2*N-1)'($signed(mplier)));
      @(posedge clock);
      #1;
      if (exp.size() == 2) begin
        logic [2*N-2:0] e;
        e = exp.pop_front();
        checks++;
        if (result !== e) begin
          failures++;
          if (failures < 5) $display("FAIL result %h expected %h", result, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
