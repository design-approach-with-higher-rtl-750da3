// wallace_tree: reduces the ten aligned Booth rows to one sum and one carry
// vector with 4:2 carry-save adders.
//
// Level 1 compresses rows 0-3 and rows 4-7 (two 4:2 CSAs, four vectors out);
// level 2 compresses those four; level 3 compresses level 2's two vectors
// with row 8 and the last neg row. Three levels of 4:2 CSAs, four CSAs in
// all, everything modulo 2^W. Combinational; the outputs go to the pipeline
// registers of mul17_b. The 4:2 CSA tree follows the original design; the
// assignment of rows to compressors is this design's own choice.
module wallace_tree #(
  parameter int unsigned W    = 33,
  parameter int unsigned ROWS = 10
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] l1a_s, l1a_c, l1b_s, l1b_c, l2_s, l2_c;

  csa42 #(.W(W)) u_l1a (.x1(rows[0]), .x2(rows[1]), .x3(rows[2]), .x4(rows[3]),
                        .sum(l1a_s), .carry(l1a_c));
  csa42 #(.W(W)) u_l1b (.x1(rows[4]), .x2(rows[5]), .x3(rows[6]), .x4(rows[7]),
                        .sum(l1b_s), .carry(l1b_c));
  csa42 #(.W(W)) u_l2  (.x1(l1a_s), .x2(l1a_c), .x3(l1b_s), .x4(l1b_c),
                        .sum(l2_s), .carry(l2_c));
  csa42 #(.W(W)) u_l3  (.x1(l2_s), .x2(l2_c), .x3(rows[8]), .x4(rows[9]),
                        .sum(sum), .carry(carry));

  if (ROWS != 10) begin : g_rows_check
    $error("wallace_tree is wired for 10 rows");
  end

endmodule
