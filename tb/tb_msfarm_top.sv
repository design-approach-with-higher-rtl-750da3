// tb_msfarm_top: runs the whole design at its default sizes: the AES
// generator feeds both farms, the comparator checks every result. The
// testbench checks independently that each compared result equals m1 * m2
// of the compared job, that the first four jobs are the words of the known
// AES-128 cipher block of the seed (FIPS-197 C.1 key and counter), that every
// issued job is checked in the end without a mismatch, and that each
// mechanism of the farms happened at least once: dispatch in both farms,
// out-of-order completion in the pencil farm, a job waiting for a free
// server, a job waiting for a reorder slot, and input buffers back-pressuring
// the generator. `run` is also dropped for a while mid-test.
module tb_msfarm_top;
  import mf_pkg::*;
  import aes_pkg::*;
  logic clk = 0, rst, run;
  block_t rng_key, rng_ctr_init;
  logic [31:0] jobs_issued, checked, mismatches;
  logic error;
  job_t last_job;
  product_t last_r1, last_r2;
  logic [3:0] farm1_ev, farm2_ev;
  int checks = 0, failures = 0;

  localparam int JOBS = 1000;

  msfarm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog: checked %0d of %0d", checked, jobs_issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  int n_disp1 = 0, n_disp2 = 0, n_ooo1 = 0, n_wait_srv = 0, n_wait_rob = 0, n_backpressure = 0;
  logic [31:0] checked_q = 0;
  job_t issued [$];

  always @(posedge clk) if (!rst) begin
    if (farm1_ev[0]) n_disp1++;
    if (farm2_ev[0]) n_disp2++;
    if (farm1_ev[1]) n_ooo1++;
    if (farm1_ev[2] || farm2_ev[2]) n_wait_srv++;
    if (farm1_ev[3] || farm2_ev[3]) n_wait_rob++;
    if (run && dut.rng_valid && !(dut.f1_in_ready && dut.f2_in_ready)) n_backpressure++;
    if (dut.issue) issued.push_back(dut.rng_job);
  end

  // every comparison: the job must be the next issued one and both results its product
  always @(negedge clk) if (!rst && checked != checked_q) begin
    checked_q = checked;
    checks++;
    if (issued.size() == 0 || last_job !== issued[0] ||
        last_r1 !== PROD_W'(last_job.m1) * PROD_W'(last_job.m2) ||
        last_r2 !== PROD_W'(last_job.m1) * PROD_W'(last_job.m2)) begin
      failures++;
      if (failures < 5) $display("FAIL compare %0d: %0d * %0d = %0d, %0d", checked,
                                 last_job.m1, last_job.m2, last_r1, last_r2);
    end
    if (checked <= 8)
      $display("Results: ( %0d * %0d = ) %0d, %0d", last_job.m1, last_job.m2, last_r1, last_r2);
    if (issued.size() > 0) void'(issued.pop_front());
  end

  initial begin
    block_t first_block = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    job_t first [$];
    rst = 1; run = 0;
    rng_key = 128'h000102030405060708090a0b0c0d0e0f;
    rng_ctr_init = 128'h00112233445566778899aabbccddeeff;
    repeat (3) @(posedge clk);
    #1 rst = 0; run = 1;
    while (first.size() < 4) begin
      @(posedge clk);
      if (dut.issue) first.push_back(dut.rng_job);
    end
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (first[w] !== job_t'(first_block[127 - 32*w -: 32])) begin
        failures++; $display("FAIL job %0d is %h", w, first[w]);
      end
    end
    wait (jobs_issued >= JOBS / 2);
    #1 run = 0;
    repeat (100) @(posedge clk);
    #1 run = 1;
    wait (jobs_issued >= JOBS);
    #1 run = 0;
    wait (checked == jobs_issued);
    repeat (20) @(posedge clk);
    #1;
    checks += 3;
    if (checked != jobs_issued) begin failures++; $display("FAIL checked %0d issued %0d", checked, jobs_issued); end
    if (mismatches != 0 || error) begin failures++; $display("FAIL comparator saw %0d mismatches", mismatches); end
    if (issued.size() != 0) begin failures++; $display("FAIL %0d jobs never compared", issued.size()); end
    $display("jobs %0d: dispatch %0d/%0d, pencil out-of-order %0d, wait for server %0d, wait for reorder slot %0d, input back-pressure %0d",
             jobs_issued, n_disp1, n_disp2, n_ooo1, n_wait_srv, n_wait_rob, n_backpressure);
    checks += 5;
    if (n_disp1 != int'(jobs_issued) || n_disp2 != int'(jobs_issued)) begin failures++; $display("FAIL dispatch count"); end
    if (n_ooo1 == 0)         begin failures++; $display("FAIL no out-of-order completion"); end
    if (n_wait_srv == 0)     begin failures++; $display("FAIL never waited for a server"); end
    if (n_wait_rob == 0)     begin failures++; $display("FAIL never waited for a reorder slot"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL input buffers never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
