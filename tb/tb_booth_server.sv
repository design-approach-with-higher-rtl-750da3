// tb_booth_server: starts a tagged job every cycle (with gaps) and checks
// that each result comes back exactly two rising edges later with the job's
// tag and the product m1 * m2.
module tb_booth_server;
  import mf_pkg::*;
  logic clk = 0, rst;
  logic start_valid, start_ready, result_valid;
  job_t start_job;
  logic [2:0] start_tag, result_tag;
  product_t result_data;
  int checks = 0, failures = 0;

  booth_server dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the cycle they must appear in
  typedef struct { logic v; logic [2:0] tag; product_t p; } exp_t;
  exp_t pipe [3];

  initial begin
    rst = 1; start_valid = 0; start_job = '0; start_tag = '0;
    pipe = '{default: '{v: 1'b0, tag: 3'd0, p: '0}};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      start_valid = ($urandom_range(0, 3) != 0);
      start_job.m1 = (i == 0) ? 16'hffff : 16'($urandom);
      start_job.m2 = (i == 0) ? 16'hffff : 16'($urandom);
      start_tag = 3'($urandom);
      checks++;
      if (!start_ready) begin failures++; $display("FAIL start_ready low"); end
      pipe[0] = '{v: start_valid, tag: start_tag,
                  p: PROD_W'(start_job.m1) * PROD_W'(start_job.m2)};
      @(posedge clk);
      #1;
      pipe[2] = pipe[1];
      pipe[1] = pipe[0];
      checks++;
      if (result_valid !== pipe[2].v ||
          (pipe[2].v && (result_tag !== pipe[2].tag || result_data !== pipe[2].p))) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: valid %0d tag %0d data %0d, expected %0d %0d %0d",
          i, result_valid, result_tag, result_data, pipe[2].v, pipe[2].tag, pipe[2].p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
