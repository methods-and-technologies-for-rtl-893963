// Shared types and constants of the signature-matching co-processor.
//
// The co-processor compares a 288-bit search key (a 32-bit packet header
// plus a 256-bit byte-shifted payload window) against a 4K-entry ternary
// CAM every clock, and runs a slower secondary lookup that combines
// programmable header tests with the primary result.  The logic-operation
// (LOP) rule type below is used by the secondary lookup: each rule compares
// the masked header with a constant using one of the six relations the
// co-processor supports (=, !=, >, >=, <, <=).  LOP_ANY (always true) is an
// addition of this design so that a secondary entry can check the payload
// signature alone.
package sm_pkg;

  localparam int HDR_W     = 32;   // header register width
  localparam int PAY_BYTES = 32;   // payload window, 256 bits
  localparam int KEY_W     = HDR_W + 8 * PAY_BYTES;  // 288-bit search key

  typedef enum logic [2:0] {
    LOP_EQ  = 3'd0,
    LOP_NE  = 3'd1,
    LOP_GT  = 3'd2,
    LOP_GE  = 3'd3,
    LOP_LT  = 3'd4,
    LOP_LE  = 3'd5,
    LOP_ANY = 3'd6
  } lop_op_e;

  typedef struct packed {
    lop_op_e            op;     // relation
    logic [HDR_W-1:0]   mask;   // header bits taking part (one field)
    logic [HDR_W-1:0]   value;  // constant to compare with
  } lop_rule_t;

  // Evaluate one rule on a header: (header & mask) <op> value, unsigned.
  function automatic logic lop_eval(lop_rule_t r, logic [HDR_W-1:0] hdr);
    logic [HDR_W-1:0] f;
    f = hdr & r.mask;
    unique case (r.op)
      LOP_EQ:  return f == r.value;
      LOP_NE:  return f != r.value;
      LOP_GT:  return f >  r.value;
      LOP_GE:  return f >= r.value;
      LOP_LT:  return f <  r.value;
      LOP_LE:  return f <= r.value;
      default: return 1'b1;
    endcase
  endfunction

endpackage
