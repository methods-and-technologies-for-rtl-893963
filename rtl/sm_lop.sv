// Programmable logic-operation (LOP) unit of the secondary lookup.
//
// Each of RULES rules tests the packet header with one relation
// (=, !=, >, >=, <, <=, or always-true) against a masked field, see
// sm_pkg::lop_eval.  The unit evaluates LANES rules per clock, so with 16
// rules and 4 lanes a check takes four clocks, which is what limits the
// secondary lookup to a quarter of the primary search rate.
// Timing: start in cycle t (header sampled then); rule group g is evaluated
// in cycle t+g; done pulses in cycle t+GROUPS (t+4) with the complete pass
// vector, which stays valid until the next start.  busy is high in cycles
// t+1 .. t+GROUPS-1; a new start is accepted in cycle t+GROUPS.
// The lane count is this design's choice.
module sm_lop
  import sm_pkg::*;
#(
  parameter int RULES = 16,
  parameter int LANES = 4,
  parameter int GROUPS = RULES / LANES,
  parameter int GW = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,          // begin a check
  input  logic [HDR_W-1:0] hdr_in,         // header to check
  input  lop_rule_t        rules [RULES],  // programmed rules
  output logic             busy,           // check in progress
  output logic             done,           // pass vector complete
  output logic [RULES-1:0] pass            // rule i is satisfied
);
  logic [HDR_W-1:0] hdr;
  logic [GW-1:0]    grp;
  logic [RULES-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      grp  <= '0;
      hdr  <= '0;
      acc  <= '0;
    end else if (start) begin
      // group 0 is evaluated in the start cycle with the incoming header
      hdr  <= hdr_in;
      for (int i = 0; i < RULES; i++)
        acc[i] <= (i < LANES) ? lop_eval(rules[i], hdr_in) : 1'b0;
      grp  <= GW'(1);
      busy <= (GROUPS > 1);
      done <= (GROUPS == 1);
    end else if (busy) begin
      for (int l = 0; l < LANES; l++)
        acc[int'(grp)*LANES + l] <= lop_eval(rules[int'(grp)*LANES + l], hdr);
      grp  <= grp + 1'b1;
      busy <= (int'(grp) != GROUPS - 1);
      done <= (int'(grp) == GROUPS - 1);
    end else begin
      done <= 1'b0;
    end
  end

  assign pass = acc;
endmodule
