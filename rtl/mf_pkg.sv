// mf_pkg: types and constants shared by the multiplication server farms.
//
// A job is a pair of 16-bit unsigned operands (m1, m2); its result is the
// 32-bit product. Both farms and the result checker use these types. The
// operand width is this design's choice: the farm test of the design feeds
// operands below 2^16, and the Booth core multiplies 17-bit two's complement
// numbers, so a 16-bit unsigned operand zero-extended to 17 bits is always a
// valid Booth input and the 33-bit Booth result holds the 32-bit product.
package mf_pkg;

  parameter int unsigned OP_W   = 16;        // operand width of a job
  parameter int unsigned PROD_W = 2 * OP_W;  // width of a job's result

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;

  // One multiplication job: result = m1 * m2.
  typedef struct packed {
    operand_t m1;
    operand_t m2;
  } job_t;

  // Kind of multiplier server a farm is built from.
  typedef enum logic {
    MULT_PENCIL = 1'b0,  // sequential paper-and-pencil shift-and-add server
    MULT_BOOTH  = 1'b1   // 2-stage pipelined modified Booth multiplier server
  } mult_kind_e;

endpackage
