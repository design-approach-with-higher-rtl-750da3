// tb_fig9_jobs: pushes the 22 operand pairs of a published run of the two
// farms, in their order, into a pencil farm and a Booth farm (default sizes)
// and checks that each farm returns the results in job order and that the
// results equal the 15 products printed in that run's log; the remaining
// 7 jobs are checked against m1 * m2. Jobs are offered back to back, so the
// small and large operands mix in the pencil farm and finish out of order.
module tb_fig9_jobs;
  import mf_pkg::*;
  logic clk = 0, rst;
  logic in_valid;
  job_t in_job;
  logic       p_in_ready, b_in_ready, p_out_valid, b_out_valid;
  product_t   p_out, b_out;
  logic [3:0] p_ev, b_ev;
  int checks = 0, failures = 0, n_ooo = 0;

  mult_farm #(.KIND(MULT_PENCIL)) u_p (
    .clk, .rst, .in_valid(in_valid && b_in_ready), .in_ready(p_in_ready), .in_job,
    .out_valid(p_out_valid), .out_ready(1'b1), .out_data(p_out),
    .ev_dispatch(p_ev[0]), .ev_ooo(p_ev[1]), .ev_wait_server(p_ev[2]), .ev_wait_rob(p_ev[3]));
  mult_farm #(.KIND(MULT_BOOTH)) u_b (
    .clk, .rst, .in_valid(in_valid && p_in_ready), .in_ready(b_in_ready), .in_job,
    .out_valid(b_out_valid), .out_ready(1'b1), .out_data(b_out),
    .ev_dispatch(b_ev[0]), .ev_ooo(b_ev[1]), .ev_wait_server(b_ev[2]), .ev_wait_rob(b_ev[3]));

  always #5 clk = ~clk;

  localparam int NJ = 22, NP = 15;
  // operand pairs in the order of the published run
  int m1s [NJ] = '{1101, 33869, 12425, 6212, 8, 262, 0, 40, 2, 2, 384, 56, 448, 8, 0,
                   25, 60, 1010, 1, 638, 3, 0};
  int m2s [NJ] = '{49702, 24851, 3106, 6, 20, 2, 321, 643, 0, 7173, 14346, 896, 3, 1, 288,
                   1824, 7, 15, 6649, 51, 0, 1};
  // products printed for the first 15 jobs
  longint printed [NP] = '{54721902, 841678519, 38592050, 37272, 160, 524, 0, 25720, 0,
                           14346, 5508864, 50176, 1344, 8, 0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic product_t expected(input int k);
    if (k < NP) return PROD_W'(printed[k]);
    return PROD_W'(m1s[k]) * PROD_W'(m2s[k]);
  endfunction

  int p_got = 0, b_got = 0;
  always @(posedge clk) if (!rst) begin
    if (p_ev[1]) n_ooo++;
    if (p_out_valid) begin
      checks++;
      if (p_got >= NJ || p_out !== expected(p_got)) begin
        failures++; $display("FAIL pencil farm job %0d: %0d", p_got, p_out);
      end else
        $display("Results: ( %0d * %0d = ) %0d", m1s[p_got], m2s[p_got], p_out);
      p_got++;
    end
    if (b_out_valid) begin
      checks++;
      if (b_got >= NJ || b_out !== expected(b_got)) begin
        failures++; $display("FAIL Booth farm job %0d: %0d", b_got, b_out);
      end
      b_got++;
    end
  end

  initial begin
    rst = 1; in_valid = 0; in_job = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NJ; k++) begin
      in_valid = 1;
      in_job = '{m1: OP_W'(m1s[k]), m2: OP_W'(m2s[k])};
      #1;
      while (!(p_in_ready && b_in_ready)) begin @(posedge clk); #1; end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    wait (p_got == NJ && b_got == NJ);
    repeat (5) @(posedge clk);
    checks += 2;
    if (p_got != NJ || b_got != NJ) begin failures++; $display("FAIL result count"); end
    if (n_ooo == 0) begin failures++; $display("FAIL no out-of-order completion"); end
    $display("out-of-order completions in the pencil farm: %0d", n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
