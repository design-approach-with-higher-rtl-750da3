// tb_mult_farm: drives a pencil farm and a Booth farm with the same random
// job stream and random output back-pressure; checks that each farm returns
// m1 * m2 for every job in job order, and counts the farm events: dispatch,
// out-of-order completion (pencil farm), waiting for a free server (pencil
// farm) and waiting for a reorder slot. An event that never happens counts
// as a failure. Also checks the Booth farm's minimum latency: a job pushed
// into an empty farm is at the output four edges later.
module tb_mult_farm;
  import mf_pkg::*;
  logic clk = 0, rst;
  logic in_valid;
  job_t in_job;
  logic       p_in_ready, b_in_ready, p_out_valid, b_out_valid, p_out_ready, b_out_ready;
  product_t   p_out, b_out;
  logic [3:0] p_ev, b_ev;
  int checks = 0, failures = 0;
  int p_cnt [4], b_cnt [4];

  mult_farm #(.KIND(MULT_PENCIL)) u_p (
    .clk, .rst, .in_valid(in_valid && b_in_ready), .in_ready(p_in_ready), .in_job,
    .out_valid(p_out_valid), .out_ready(p_out_ready), .out_data(p_out),
    .ev_dispatch(p_ev[0]), .ev_ooo(p_ev[1]), .ev_wait_server(p_ev[2]), .ev_wait_rob(p_ev[3]));
  mult_farm #(.KIND(MULT_BOOTH)) u_b (
    .clk, .rst, .in_valid(in_valid && p_in_ready), .in_ready(b_in_ready), .in_job,
    .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out),
    .ev_dispatch(b_ev[0]), .ev_ooo(b_ev[1]), .ev_wait_server(b_ev[2]), .ev_wait_rob(b_ev[3]));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  product_t p_exp [$], b_exp [$];

  always @(posedge clk) if (!rst) begin
    for (int e = 0; e < 4; e++) begin
      if (p_ev[e]) p_cnt[e]++;
      if (b_ev[e]) b_cnt[e]++;
    end
    if (p_out_valid && p_out_ready) begin
      checks++;
      if (p_exp.size() == 0 || p_out !== p_exp[0]) begin
        failures++; $display("FAIL pencil farm result %0d", p_out);
      end
      if (p_exp.size() > 0) void'(p_exp.pop_front());
    end
    if (b_out_valid && b_out_ready) begin
      checks++;
      if (b_exp.size() == 0 || b_out !== b_exp[0]) begin
        failures++; $display("FAIL Booth farm result %0d", b_out);
      end
      if (b_exp.size() > 0) void'(b_exp.pop_front());
    end
    if (in_valid && p_in_ready && b_in_ready) begin
      p_exp.push_back(PROD_W'(in_job.m1) * PROD_W'(in_job.m2));
      b_exp.push_back(PROD_W'(in_job.m1) * PROD_W'(in_job.m2));
    end
  end

  initial begin
    int sent = 0;
    rst = 1; in_valid = 0; in_job = '0; p_out_ready = 1; b_out_ready = 1;
    foreach (p_cnt[e]) begin p_cnt[e] = 0; b_cnt[e] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // latency of the Booth farm when empty
    in_valid = 1; in_job = '{m1: 16'd1101, m2: 16'd49702};
    @(posedge clk);
    #1 in_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!b_out_valid || b_out !== 32'd54721902) begin
      failures++; $display("FAIL Booth farm latency/result: valid %0d data %0d", b_out_valid, b_out);
    end
    wait (p_exp.size() == 0 && b_exp.size() == 0);
    @(posedge clk);
    #1;
    // random stream with phases of output back-pressure
    while (sent < 600) begin
      in_valid = $urandom_range(0, 99) < 80;
      in_job.m1 = 16'($urandom) >> $urandom_range(0, 12);
      in_job.m2 = 16'($urandom) >> $urandom_range(0, 15);
      p_out_ready = ((sent / 100) % 2 == 0) ? 1'b1 : ($urandom_range(0, 9) == 0);
      b_out_ready = ((sent / 100) % 2 == 0) ? 1'b1 : ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (in_valid && p_in_ready && b_in_ready) sent++;
      #1;
    end
    in_valid = 0; p_out_ready = 1; b_out_ready = 1;
    while (p_exp.size() != 0 || b_exp.size() != 0) @(posedge clk);
    #1;
    $display("pencil farm: dispatch %0d ooo %0d wait_server %0d wait_rob %0d", p_cnt[0], p_cnt[1], p_cnt[2], p_cnt[3]);
    $display("Booth  farm: dispatch %0d ooo %0d wait_server %0d wait_rob %0d", b_cnt[0], b_cnt[1], b_cnt[2], b_cnt[3]);
    checks += 6;
    if (p_cnt[0] != 601 || b_cnt[0] != 601) begin failures++; $display("FAIL dispatch count"); end
    if (p_cnt[1] == 0) begin failures++; $display("FAIL no out-of-order completion"); end
    if (p_cnt[2] == 0) begin failures++; $display("FAIL servers never all busy"); end
    if (p_cnt[3] == 0 && b_cnt[3] == 0) begin failures++; $display("FAIL reorder buffer never full"); end
    if (b_cnt[1] != 0) begin failures++; $display("FAIL Booth farm completed out of order"); end
    if (b_cnt[2] != 0) begin failures++; $display("FAIL Booth server not ready"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
