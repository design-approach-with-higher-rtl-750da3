// mult_farm: multiplication server farm. Jobs enter an input buffer, an
// arbiter hands each job to a free multiplier server, and a reorder
// (completion) buffer returns the results in the order the jobs arrived.
//
// Dispatch: when the input buffer holds a job, some server is ready and the
// completion buffer has a free slot, the job leaves the buffer in one cycle:
// a slot is reserved, its token goes with the job as tag to the server the
// round-robin arbiter granted. Each server writes its result into the
// completion buffer through its own completion port, addressed by the tag.
// The completion buffer is drained into out_* in job order.
//
// KIND chooses the servers: MULT_PENCIL (sequential shift-and-add, time per
// job depends on the operand m2) or MULT_BOOTH (2-stage pipelined modified
// Booth multiplier, a job every cycle, fixed 2-cycle latency). SERVERS
// servers, SLOTS reorder slots (at most SLOTS jobs in flight), IN_DEPTH input
// buffer entries.
//
// Interface: in_valid/in_ready/in_job accept a job; out_valid/out_ready/
// out_data give the product. Fastest path: a job pushed at edge k is
// dispatched at edge k+1, completes (Booth) at edge k+3 and can be drained at
// edge k+4. Status pulses, one cycle each: ev_dispatch (a job went to a
// server), ev_ooo (a job completed while an older job was still running),
// ev_wait_server (a job waited because no server was free), ev_wait_rob (a
// job waited because every reorder slot was taken).
// The original design gives the structure (input buffer, servers, arbiter, reorder
// buffer) and shows four servers per farm; the slot and buffer sizes, the
// round-robin order and the handshakes are this design's choice.
module mult_farm
  import mf_pkg::*;
#(
  parameter mult_kind_e  KIND     = MULT_PENCIL,
  parameter int unsigned SERVERS  = 4,
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned IN_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  output logic     in_ready,
  input  job_t     in_job,
  output logic     out_valid,
  input  logic     out_ready,
  output product_t out_data,
  output logic     ev_dispatch,
  output logic     ev_ooo,
  output logic     ev_wait_server,
  output logic     ev_wait_rob
);

  localparam int unsigned TW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned IW = $clog2(SERVERS > 1 ? SERVERS : 2);

  // input buffer
  logic  job_valid, job_take;
  job_t  job;

  sync_fifo #(.T(job_t), .DEPTH(IN_DEPTH)) u_inbuf (
    .clk, .rst,
    .in_valid, .in_ready, .in_data(in_job),
    .out_valid(job_valid), .out_ready(job_take), .out_data(job));

  // arbiter over ready servers
  logic [SERVERS-1:0] srv_ready, grant;
  logic [IW-1:0]      grant_idx;
  logic               any_ready;
  logic               rob_ready;
  logic [TW-1:0]      token, head_token;

  assign job_take = job_valid && any_ready && rob_ready;

  rr_arbiter #(.N(SERVERS)) u_arb (
    .clk, .rst, .req(srv_ready), .advance(job_take),
    .grant, .grant_idx, .any(any_ready));

  // servers
  logic          res_valid [SERVERS];
  logic [TW-1:0] res_tag   [SERVERS];
  product_t      res_data  [SERVERS];

  for (genvar i = 0; i < SERVERS; i++) begin : g_srv
    if (KIND == MULT_BOOTH) begin : g_booth
      booth_server #(.TAG_W(TW)) u_srv (
        .clk, .rst,
        .start_valid(job_take && grant[i]), .start_ready(srv_ready[i]),
        .start_job(job), .start_tag(token),
        .result_valid(res_valid[i]), .result_tag(res_tag[i]), .result_data(res_data[i]));
    end else begin : g_pencil
      pencil_server #(.TAG_W(TW)) u_srv (
        .clk, .rst,
        .start_valid(job_take && grant[i]), .start_ready(srv_ready[i]),
        .start_job(job), .start_tag(token),
        .result_valid(res_valid[i]), .result_tag(res_tag[i]), .result_data(res_data[i]));
    end
  end

  // reorder buffer, one completion port per server
  completion_buffer #(.T(product_t), .SLOTS(SLOTS), .PORTS(SERVERS)) u_rob (
    .clk, .rst,
    .reserve_valid(job_take), .reserve_ready(rob_ready), .reserve_token(token),
    .cmpl_valid(res_valid), .cmpl_token(res_tag), .cmpl_data(res_data),
    .drain_valid(out_valid), .drain_ready(out_ready), .drain_data(out_data),
    .head_token);

  // status
  // out of order: a younger job completes while the oldest job (head) has
  // neither completed earlier (out_valid) nor completes in this cycle
  always_comb begin
    logic younger, head_now;
    younger  = 1'b0;
    head_now = 1'b0;
    for (int i = 0; i < SERVERS; i++) begin
      if (res_valid[i] && res_tag[i] != head_token) younger  = 1'b1;
      if (res_valid[i] && res_tag[i] == head_token) head_now = 1'b1;
    end
    ev_ooo = younger && !head_now && !out_valid;
  end
  assign ev_dispatch    = job_take;
  assign ev_wait_server = job_valid && !any_ready;
  assign ev_wait_rob    = job_valid && any_ready && !rob_ready;

endmodule
