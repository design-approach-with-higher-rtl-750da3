// tb_completion_buffer: reserves slots, completes them in random order
// through two completion ports, and checks that drained results come out in
// reservation order, that reserve_ready drops exactly when all slots are
// taken, and that tokens run through the slots in order.
module tb_completion_buffer;
  localparam int SLOTS = 4, PORTS = 2, TW = 2;
  logic clk = 0, rst;
  logic reserve_valid, reserve_ready;
  logic [TW-1:0] reserve_token, head_token;
  logic          cmpl_valid [PORTS];
  logic [TW-1:0] cmpl_token [PORTS];
  logic [31:0]   cmpl_data  [PORTS];
  logic drain_valid, drain_ready;
  logic [31:0] drain_data;
  int checks = 0, failures = 0;
  int n_full = 0, n_ooo = 0, n_drained = 0;

  completion_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: reserved jobs in order, with their token, value and state
  typedef struct { int tok; logic [31:0] val; bit done; } ent_t;
  ent_t q [$];

  initial begin
    int exp_tok = 0;
    rst = 1; reserve_valid = 0; drain_ready = 0;
    foreach (cmpl_valid[p]) begin cmpl_valid[p] = 0; cmpl_token[p] = '0; cmpl_data[p] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      int pick [PORTS];
      reserve_valid = $urandom_range(0, 99) < 60;
      drain_ready   = $urandom_range(0, 99) < 60;
      // choose up to PORTS distinct reserved, unfinished jobs to complete
      foreach (pick[p]) begin
        pick[p] = -1;
        cmpl_valid[p] = 0;
        if ($urandom_range(0, 1)) begin
          int c;
          c = $urandom_range(0, SLOTS - 1);
          if (c < q.size() && !q[c].done && (p == 0 || pick[0] != c)) begin
            pick[p] = c;
            cmpl_valid[p] = 1;
            cmpl_token[p] = TW'(q[c].tok);
            cmpl_data[p]  = q[c].val;
            if (c > 0 && !q[0].done) n_ooo++;
          end
        end
      end
      #1;
      checks += 2;
      if (reserve_ready !== (q.size() < SLOTS)) begin failures++; $display("FAIL reserve_ready"); end
      if (reserve_ready && reserve_token !== TW'(exp_tok)) begin failures++; $display("FAIL token"); end
      if (!reserve_ready) n_full++;
      checks++;
      if (drain_valid !== (q.size() > 0 && q[0].done)) begin
        failures++; $display("FAIL drain_valid %0d", drain_valid);
      end
      if (drain_valid && drain_ready) begin
        checks++;
        if (drain_data !== q[0].val) begin failures++; $display("FAIL drain %h expected %h", drain_data, q[0].val); end
      end
      @(posedge clk);
      foreach (pick[p]) if (pick[p] >= 0) q[pick[p]].done = 1;
      if (drain_valid && drain_ready) begin void'(q.pop_front()); n_drained++; end
      if (reserve_valid && reserve_ready) begin
        q.push_back('{tok: exp_tok, val: $urandom, done: 0});
        exp_tok = (exp_tok + 1) % SLOTS;
      end
      #1;
    end
    checks += 3;
    if (n_full == 0) begin failures++; $display("FAIL buffer never full"); end
    if (n_ooo == 0)  begin failures++; $display("FAIL no out-of-order completion"); end
    if (n_drained < 100) begin failures++; $display("FAIL only %0d drained", n_drained); end
    $display("full %0d, out-of-order completions %0d, drained %0d", n_full, n_ooo, n_drained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
