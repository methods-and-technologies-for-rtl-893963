// Secondary lookup of the signature-matching co-processor.
//
// Detects packets that need both a header condition (e.g. a port range) and
// a payload signature.  Each of the ENTRIES secondary entries holds a LOP
// rule on the header and the 12-bit address of a primary TCAM entry (the
// signature).  For a primary hit the unit runs the LOP check on the header
// register (four clocks, sm_lop), then searches the binary CAM with the
// primary hit address; entry i reports when its rule passed and its stored
// address equals the hit address.  The lowest such entry is output.
// Timing: a request accepted in cycle t gives sec_vld in cycle t+5; a new
// request is accepted every 4 clocks (a quarter of the primary rate).  A
// primary hit that arrives while the LOP check is busy is not looked up and
// is flagged with sec_drop; dropping rather than queueing is this design's
// choice.  Rules and addresses are written through the cfg_* port.
module sm_secondary
  import sm_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int ADDR_W  = 12,
  parameter int OFS_W   = 16,
  parameter int IW      = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,       // write a secondary entry
  input  logic [IW-1:0]     cfg_idx,      // entry index
  input  lop_rule_t         cfg_rule,     // header rule of the entry
  input  logic [ADDR_W-1:0] cfg_addr,     // primary entry it pairs with
  input  logic              cfg_vld,      // entry enabled
  input  logic [HDR_W-1:0]  hdr,          // header register
  input  logic              req,          // primary hit to look up
  input  logic [ADDR_W-1:0] req_addr,     // primary hit address
  input  logic [OFS_W-1:0]  req_ofs,      // packet offset of the hit
  output logic              sec_drop,     // request refused (busy)
  output logic              sec_vld,      // secondary result valid
  output logic              sec_hit,      // some secondary entry hit
  output logic [IW-1:0]     sec_idx,      // lowest hitting entry
  output logic [OFS_W-1:0]  sec_ofs       // offset of the primary hit
);
  lop_rule_t rules [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) rules[i] <= '{op: LOP_ANY, mask: '0, value: '0};
    end else if (cfg_we) begin
      rules[cfg_idx] <= cfg_rule;
    end
  end

  logic              lop_busy, lop_done, accept;
  logic [ENTRIES-1:0] lop_pass, pass_q, match;
  logic              mvld;
  logic [ADDR_W-1:0] addr_q;
  logic [OFS_W-1:0]  ofs_q, ofs_q2;

  assign accept   = req && !lop_busy;
  assign sec_drop = req && lop_busy;

  sm_lop #(.RULES(ENTRIES), .LANES(4)) u_lop (
    .clk(clk), .rst_n(rst_n), .start(accept), .hdr_in(hdr), .rules(rules),
    .busy(lop_busy), .done(lop_done), .pass(lop_pass));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0; ofs_q <= '0; ofs_q2 <= '0; pass_q <= '0;
    end else begin
      if (accept)   begin addr_q <= req_addr; ofs_q <= req_ofs; end
      if (lop_done) begin pass_q <= lop_pass; ofs_q2 <= ofs_q; end
    end
  end

  bcam #(.ENTRIES(ENTRIES), .W(ADDR_W)) u_bcam (
    .clk(clk), .rst_n(rst_n), .we(cfg_we), .waddr(cfg_idx), .wdata(cfg_addr),
    .wvalid(cfg_vld), .srch(lop_done), .key(addr_q), .mvld(mvld), .match(match));

  logic pe_multi;  // several secondary entries hit; not brought out
  prio_enc #(.N(ENTRIES)) u_pe (.req(match & pass_q), .hit(sec_hit), .multi(pe_multi), .idx(sec_idx));
  assign sec_vld = mvld;
  assign sec_ofs = ofs_q2;
endmodule
