// completion_buffer: reorder buffer with several completion (update) ports.
//
// Jobs may finish out of order; the buffer hands their results back in the
// order in which the jobs were started. Three operations:
//   reserve  - reserve_valid && reserve_ready takes the slot at the tail and
//              returns its index as reserve_token (valid in the same cycle,
//              before the handshake); reserve_ready is low while all SLOTS
//              slots are taken.
//   complete - on each of the PORTS ports, cmpl_valid[p] writes cmpl_data[p]
//              into slot cmpl_token[p] and marks it filled. Any port may write
//              any slot, as in a multiplexer in front of every slot.
//   drain    - drain_valid is high while the oldest reserved slot (the head)
//              is filled; drain_data is its result; drain_ready frees it.
// A slot goes through free -> reserved -> filled -> free. A result completed
// at edge k can be drained at edge k+1; a fast job waits in its slot until
// every job reserved before it has been drained. head_token shows the
// slot of the oldest job, for status only. Reset (synchronous, active
// high) frees all slots. Assertions check that a completion only writes a
// reserved, not yet filled slot and that two ports do not write the same
// slot in one cycle. Reserve/complete/drain and the multi-port update follow
// the original design; slot count, port count default (4 and 2, as in its drawing of
// the concept), token encoding and handshakes are this design's choice.
module completion_buffer #(
  parameter type         T     = logic [31:0],
  parameter int unsigned SLOTS = 4,
  parameter int unsigned PORTS = 2,
  localparam int unsigned TW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // reserve
  input  logic          reserve_valid,
  output logic          reserve_ready,
  output logic [TW-1:0] reserve_token,
  // complete
  input  logic          cmpl_valid [PORTS],
  input  logic [TW-1:0] cmpl_token [PORTS],
  input  T              cmpl_data  [PORTS],
  // drain
  output logic          drain_valid,
  input  logic          drain_ready,
  output T              drain_data,
  // status: slot of the oldest job
  output logic [TW-1:0] head_token
);

  T               data   [SLOTS];
  logic [SLOTS-1:0] filled;
  logic [TW-1:0]  head, tail;
  logic [TW:0]    count;
  logic           do_reserve, do_drain;

  function automatic logic [TW-1:0] next_idx(input logic [TW-1:0] p);
    return (p == TW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  // slot i is reserved (taken) if it lies in [head, head+count)
  function automatic logic is_taken(input logic [TW-1:0] i, input logic [TW-1:0] h,
                                    input logic [TW:0] c);
    int unsigned d;
    d = (int'(i) >= int'(h)) ? int'(i) - int'(h) : int'(i) + SLOTS - int'(h);
    return d < c;
  endfunction

  assign reserve_ready = (count < (TW+1)'(SLOTS));
  assign reserve_token = tail;
  assign do_reserve    = reserve_valid && reserve_ready;
  assign drain_valid   = (count != '0) && filled[head];
  assign drain_data    = data[head];
  assign do_drain      = drain_valid && drain_ready;
  assign head_token    = head;

  always_ff @(posedge clk) begin
    if (rst) begin
      head   <= '0;
      tail   <= '0;
      count  <= '0;
      filled <= '0;
    end else begin
      if (do_reserve) tail <= next_idx(tail);
      if (do_drain)   head <= next_idx(head);
      count <= count + (TW+1)'(do_reserve) - (TW+1)'(do_drain);
      for (int p = 0; p < PORTS; p++)
        if (cmpl_valid[p]) filled[cmpl_token[p]] <= 1'b1;
      if (do_drain) filled[head] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++)
      if (cmpl_valid[p]) data[cmpl_token[p]] <= cmpl_data[p];
  end

  // rules of the completion ports
  for (genvar p = 0; p < PORTS; p++) begin : g_port_checks
    assert property (@(posedge clk) disable iff (rst)
      cmpl_valid[p] |-> is_taken(cmpl_token[p], head, count) && !filled[cmpl_token[p]])
      else $error("completion to a slot that is not reserved or already filled");
    for (genvar q = p + 1; q < PORTS; q++) begin : g_pair
      assert property (@(posedge clk) disable iff (rst)
        !(cmpl_valid[p] && cmpl_valid[q] && cmpl_token[p] == cmpl_token[q]))
        else $error("two completion ports wrote the same slot");
    end
  end

endmodule
