// tb_pencil_server: gives the shift-and-add server jobs one after another
// and checks the product, the tag, the ready signal while busy, and the
// operand-dependent latency: result_valid rises max(1, bit length of m2) + 1
// rising edges after the edge that accepted the job.
module tb_pencil_server;
  import mf_pkg::*;
  logic clk = 0, rst;
  logic start_valid, start_ready, result_valid;
  job_t start_job;
  logic [2:0] start_tag, result_tag;
  product_t result_data;
  int checks = 0, failures = 0;

  pencil_server dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitlen(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  initial begin
    rst = 1; start_valid = 0; start_job = '0; start_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int lat, exp_lat;
      start_job.m1 = 16'($urandom);
      case (i)
        0: start_job.m2 = 16'h0000;
        1: start_job.m2 = 16'h0001;
        2: start_job.m2 = 16'hffff;
        3: start_job.m2 = 16'h8000;
        default: start_job.m2 = 16'($urandom) >> $urandom_range(0, 15);
      endcase
      start_tag = 3'(i);
      start_valid = 1;
      checks++;
      if (!start_ready) begin failures++; $display("FAIL not ready when idle"); end
      @(posedge clk);
      #1 start_valid = 0;
      lat = 1;
      while (!result_valid && lat < 40) begin
        checks++;
        if (start_ready) begin failures++; $display("FAIL ready while busy"); end
        @(posedge clk);
        #1 lat++;
      end
      exp_lat = ((bitlen(start_job.m2) > 1) ? bitlen(start_job.m2) : 1) + 1;
      checks += 3;
      if (lat != exp_lat) begin
        failures++; $display("FAIL m2=%h latency %0d expected %0d", start_job.m2, lat, exp_lat);
      end
      if (result_data !== PROD_W'(start_job.m1) * PROD_W'(start_job.m2)) begin
        failures++; $display("FAIL %0d * %0d = %0d", start_job.m1, start_job.m2, result_data);
      end
      if (result_tag !== 3'(i)) begin failures++; $display("FAIL tag"); end
      if ($urandom_range(0, 1)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
