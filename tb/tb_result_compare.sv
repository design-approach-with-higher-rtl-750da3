// tb_result_compare: feeds jobs and results with random valid timing,
// some results deliberately wrong in one farm or the other, and checks the
// checked/mismatch counters, the sticky error flag and the last_* values.
module tb_result_compare;
  import mf_pkg::*;
  logic clk = 0, rst;
  logic job_valid, job_ready, r1_valid, r1_ready, r2_valid, r2_ready, error;
  job_t job, last_job;
  product_t r1_data, r2_data, last_r1, last_r2;
  logic [31:0] checked, mismatches;
  int checks = 0, failures = 0;

  result_compare dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ok = 0, n_bad = 0;
    rst = 1; job_valid = 0; r1_valid = 0; r2_valid = 0; job = '0; r1_data = '0; r2_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      product_t p;
      int kind;
      job.m1 = 16'($urandom); job.m2 = 16'($urandom);
      p = PROD_W'(job.m1) * PROD_W'(job.m2);
      kind = (i < 100) ? 0 : $urandom_range(0, 5);
      r1_data = (kind == 1) ? p ^ 32'h1 : p;
      r2_data = (kind == 2) ? p + 32'd4 : p;
      if (kind == 1 || kind == 2) n_bad++; else n_ok++;
      job_valid = $urandom_range(0, 1); r1_valid = $urandom_range(0, 1); r2_valid = $urandom_range(0, 1);
      #1;
      while (!(job_valid && r1_valid && r2_valid)) begin
        checks++;
        if (job_ready || r1_ready || r2_ready) begin failures++; $display("FAIL took with a missing input"); end
        @(posedge clk);
        #1;
        job_valid |= $urandom_range(0, 1); r1_valid |= $urandom_range(0, 1); r2_valid |= $urandom_range(0, 1);
        #1;
      end
      checks++;
      if (!(job_ready && r1_ready && r2_ready)) begin failures++; $display("FAIL not taken"); end
      @(posedge clk);
      #1 job_valid = 0; r1_valid = 0; r2_valid = 0;
      checks += 3;
      if (checked !== 32'(i + 1)) begin failures++; $display("FAIL checked %0d", checked); end
      if (mismatches !== 32'(n_bad)) begin failures++; $display("FAIL mismatches %0d expected %0d", mismatches, n_bad); end
      if (last_job !== job || last_r1 !== r1_data || last_r2 !== r2_data) begin failures++; $display("FAIL last_*"); end
      checks++;
      if (error !== (n_bad > 0)) begin failures++; $display("FAIL error flag"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
