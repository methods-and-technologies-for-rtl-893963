// Signature-matching co-processor (primary TCAM + secondary lookup).
//
// Finds known attack signatures anywhere in a packet payload, optionally
// combined with header conditions, at one payload byte per clock.
//  * sm_request_gen builds the 288-bit key {32-bit header, 32-byte window}
//    from a header register and a byte-shifting payload register, so only
//    one byte per clock crosses the pins.
//  * tcam_sl_gen turns the key into search lines, conventional or 2-bit
//    encoded (cfg_enc); tcam_store_enc encodes written entries the same way.
//  * sm_tcam is the 4K x 288 primary TCAM with the two-stage improved
//    pipelined search, shift redundancy and priority encoding.
//  * sm_secondary checks header rules (LOP) and pairs them with primary hit
//    addresses in a 16 x 12 binary CAM, at one lookup per 4 clocks.
// Timing: a payload byte accepted in cycle t gives its primary result
// (res_*) in cycle t+4 with the byte's packet offset; a primary hit is
// passed to the secondary lookup, whose result (sec_*) follows 5 clocks
// later.  Fuse contents for the redundancy come in on fail_row/fail_vld;
// prog_done tells when the repair MUX is set up (searches before that see
// unrepaired match lines).  cfg_enc must be fixed while entries are written
// and searched.  Byte order in keys and entries: see sm_request_gen.
// Default ENTRIES is 1024 (the document's table has 4096): the row loops at
// 4096 entries exceed the elaboration tools' loop limit.
module sigmatch_top
  import sm_pkg::*;
#(
  parameter int ENTRIES      = 1024,
  parameter int SEG_ROWS     = 256,
  parameter int BCAM_ENTRIES = 16,
  parameter int OFS_W        = 16,
  parameter int PAIRS        = KEY_W / 2,
  parameter int SEGS         = ENTRIES / SEG_ROWS,
  parameter int AW           = $clog2(ENTRIES),
  parameter int LW           = $clog2(SEG_ROWS),
  parameter int BW           = $clog2(BCAM_ENTRIES),
  parameter int CW           = $clog2(SEGS * (SEG_ROWS + 2) + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_enc,       // 1: encoded search lines/storage
  input  logic [2:0]        cfg_hdr_bytes, // header bytes compared (0..4)
  input  logic [5:0]        cfg_pay_bytes, // payload bytes compared (1..32)
  // redundancy fuses
  input  logic [LW-1:0]     fail_row [SEGS], // failed row per segment
  input  logic              fail_vld [SEGS], // segment repaired
  output logic              prog_done,       // repair MUX loaded
  // primary table write/read
  input  logic              tw_en,         // write a signature entry
  input  logic [AW-1:0]     tw_addr,       // entry address (priority)
  input  logic [KEY_W-1:0]  tw_value,      // entry digits
  input  logic [KEY_W-1:0]  tw_care,       // 1 = digit compared
  input  logic              tw_valid,      // 1 store, 0 delete
  input  logic              tr_en,         // read an entry
  input  logic [AW-1:0]     tr_addr,       // entry address
  output logic [2*KEY_W-1:0] tr_cells,     // stored cells (1 clock later)
  output logic              tr_valid,      // stored valid bit
  // secondary table write
  input  logic              sw_en,         // write a secondary entry
  input  logic [BW-1:0]     sw_idx,        // secondary entry index
  input  lop_rule_t         sw_rule,       // header rule
  input  logic [AW-1:0]     sw_addr,       // paired primary entry
  input  logic              sw_vld,        // entry enabled
  // packet stream
  input  logic              hdr_load,      // load the header register
  input  logic [HDR_W-1:0]  hdr_in,        // header field
  input  logic              pkt_start,     // first byte of a packet
  input  logic              byte_vld,      // payload byte valid
  input  logic [7:0]        byte_in,       // payload byte
  // primary result
  output logic              res_vld,       // one result per byte
  output logic              res_hit,       // signature found
  output logic              res_multi,     // several signatures found
  output logic [AW-1:0]     res_addr,      // highest-priority entry
  output logic [OFS_W-1:0]  res_ofs,       // offset of the last signature byte
  // secondary result
  output logic              sec_drop,      // hit not looked up (busy)
  output logic              sec_vld,       // secondary result valid
  output logic              sec_hit,       // header rule and signature hit
  output logic [BW-1:0]     sec_idx,       // secondary entry
  output logic [OFS_W-1:0]  sec_ofs,       // offset of the primary hit
  // search activity
  output logic              sl2_active,    // stage-2 search lines driven
  output logic [CW-1:0]     ml2_dis_cnt    // stage-2 match-line discharges
);
  logic             key_vld;
  logic [KEY_W-1:0] key;
  logic [KEY_W/8-1:0] byte_care;
  logic [OFS_W-1:0] offset;
  logic [HDR_W-1:0] hdr;

  sm_request_gen #(.HDR_W(HDR_W), .PAY_BYTES(PAY_BYTES), .OFS_W(OFS_W)) u_req (
    .clk(clk), .rst_n(rst_n), .hdr_load(hdr_load), .hdr_in(hdr_in),
    .pkt_start(pkt_start), .byte_vld(byte_vld), .byte_in(byte_in),
    .hdr_bytes(cfg_hdr_bytes), .pay_bytes(cfg_pay_bytes),
    .key_vld(key_vld), .key(key), .byte_care(byte_care), .offset(offset), .hdr(hdr));

  logic [4*PAIRS-1:0] sl, wcells;
  tcam_sl_gen #(.PAIRS(PAIRS)) u_sl (
    .enc_mode(cfg_enc), .key(key), .byte_care(byte_care), .sl(sl));
  tcam_store_enc #(.PAIRS(PAIRS)) u_enc (
    .enc_mode(cfg_enc), .value(tw_value), .care(tw_care), .cells(wcells));

  sm_tcam #(.ENTRIES(ENTRIES), .PAIRS(PAIRS), .S1_PAIRS(PAIRS/2),
            .SEG_ROWS(SEG_ROWS), .SPARES(2), .TAG_W(OFS_W)) u_tcam (
    .clk(clk), .rst_n(rst_n), .fail_row(fail_row), .fail_vld(fail_vld),
    .prog_done(prog_done),
    .wr_en(tw_en), .wr_addr(tw_addr), .wr_cells(wcells), .wr_valid(tw_valid),
    .rd_en(tr_en), .rd_addr(tr_addr), .rd_cells(tr_cells), .rd_valid(tr_valid),
    .srch_en(key_vld), .sl(sl), .tag_in(offset),
    .res_vld(res_vld), .res_hit(res_hit), .res_multi(res_multi),
    .res_addr(res_addr), .res_tag(res_ofs),
    .sl2_active(sl2_active), .ml2_dis_cnt(ml2_dis_cnt));

  sm_secondary #(.ENTRIES(BCAM_ENTRIES), .ADDR_W(AW), .OFS_W(OFS_W)) u_sec (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(sw_en), .cfg_idx(sw_idx), .cfg_rule(sw_rule), .cfg_addr(sw_addr),
    .cfg_vld(sw_vld), .hdr(hdr),
    .req(res_vld && res_hit), .req_addr(res_addr), .req_ofs(res_ofs),
    .sec_drop(sec_drop), .sec_vld(sec_vld), .sec_hit(sec_hit),
    .sec_idx(sec_idx), .sec_ofs(sec_ofs));
endmodule
