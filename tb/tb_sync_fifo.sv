// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, in_ready (full) and out_valid (empty) every cycle.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  int full_seen = 0;

  sync_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [$];
    rst = 1; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      in_valid  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 40));
      out_ready = ($urandom_range(0, 99) < ((i / 500) % 2 ? 40 : 70));
      in_data   = $urandom;
      #1;
      checks += 2;
      if (in_ready !== (model.size() < DEPTH)) begin failures++; $display("FAIL in_ready"); end
      if (out_valid !== (model.size() > 0)) begin failures++; $display("FAIL out_valid"); end
      if (!in_ready) full_seen++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("FAIL data %h expected %h", out_data, model[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
