// Top level of the functional-memory collection: three independent designs
// side by side, each with its own ports brought out under a prefix.
//
//   sm_*  signature-matching co-processor: byte-shifting request generator,
//         4K x 288-bit pipelined hierarchical TCAM with 2-bit encoded search
//         lines, priority encoder, row redundancy, and a secondary lookup
//         (LOP header rules plus a 16-entry binary CAM).
//   tc_*  18 Mb TCAM: 16 banks of 16K x 72 bits with a DX pre-search that
//         powers only the banks of the addressed table, 72/144/288/576-bit
//         entries and an aging (vacant/hit) flag on bit 0.
//   fb_*  3D frame-buffer memory: seven-stage pixel ALU (depth test, alpha
//         blend with pre-add multipliers), L1 cache, four-bank DRAM with
//         concurrent read/write bus and page duplication for clearing.
// Plus a stand-alone multi-sample filter (flt_*), the weighted sum over 16
// samples used for anti-aliasing.
//
// The designs share clk and rst_n and nothing else; timing of each group is
// described in the corresponding module.  Default sizes are the ones given
// in the document: 4096 x 288 signatures, 16 x 16K x 72 TCAM, 4 x 1024 x
// 10,240-bit frame-buffer DRAM.  Grouping them in one top is this design's
// choice.
// Reduced defaults: SM_ENTRIES 1024 (document 4096), TC_ROWS 256 (16K) and
// FB_ROWS 64 (1024); the README explains why.
module functional_mem_top
  import sm_pkg::*;
  import fb_pkg::*;
#(
  parameter int SM_ENTRIES   = 1024,
  parameter int SM_SEG_ROWS  = 256,
  parameter int TC_BANKS     = 16,
  parameter int TC_ROWS      = 256,
  parameter int FB_BANKS     = 4,
  parameter int FB_ROWS      = 64,
  parameter int FB_PAGE_BLKS = 20,
  parameter int FB_LINES     = 32,
  parameter int FLT_SAMPLES  = 16,
  parameter int SM_OFS_W     = 16,
  parameter int SM_SEGS      = SM_ENTRIES / SM_SEG_ROWS,
  parameter int SM_AW        = $clog2(SM_ENTRIES),
  parameter int SM_LW        = $clog2(SM_SEG_ROWS),
  parameter int SM_BW        = 4,
  parameter int SM_CW        = $clog2(SM_SEGS * (SM_SEG_ROWS + 2) + 1),
  parameter int TC_W         = 72,
  parameter int TC_DXW       = 4,
  parameter int TC_BKW       = $clog2(TC_BANKS),
  parameter int TC_AW        = $clog2(TC_ROWS) + TC_BKW,
  parameter int FB_AW        = ((FB_BANKS > 1) ? $clog2(FB_BANKS) : 1) + $clog2(FB_ROWS) + $clog2(FB_PAGE_BLKS) + 3,
  parameter int FLT_SUMW     = 16 + $clog2(FLT_SAMPLES)
) (
  input  logic                  clk,
  input  logic                  rst_n,

  input  logic                  sm_cfg_enc, // 1: encoded search lines/storage
  input  logic [2:0]            sm_cfg_hdr_bytes, // header bytes compared (0..4)
  input  logic [5:0]            sm_cfg_pay_bytes, // payload bytes compared (1..32)
  input  logic [SM_LW-1:0]      sm_fail_row [SM_SEGS], // failed row per segment
  input  logic                  sm_fail_vld [SM_SEGS], // segment repaired
  output logic                  sm_prog_done, // repair MUX loaded
  input  logic                  sm_tw_en, // write a signature entry
  input  logic [SM_AW-1:0]      sm_tw_addr, // entry address (priority)
  input  logic [KEY_W-1:0]      sm_tw_value, // entry digits
  input  logic [KEY_W-1:0]      sm_tw_care, // 1 = digit compared
  input  logic                  sm_tw_valid, // 1 store, 0 delete
  input  logic                  sm_tr_en, // read an entry
  input  logic [SM_AW-1:0]      sm_tr_addr, // entry address
  output logic [2*KEY_W-1:0]    sm_tr_cells, // stored cells (1 clock later)
  output logic                  sm_tr_valid, // stored valid bit
  input  logic                  sm_sw_en, // write a secondary entry
  input  logic [SM_BW-1:0]      sm_sw_idx, // secondary entry index
  input  lop_rule_t             sm_sw_rule, // header rule
  input  logic [SM_AW-1:0]      sm_sw_addr, // paired primary entry
  input  logic                  sm_sw_vld, // entry enabled
  input  logic                  sm_hdr_load, // load the header register
  input  logic [HDR_W-1:0]      sm_hdr_in, // header field
  input  logic                  sm_pkt_start, // first byte of a packet
  input  logic                  sm_byte_vld, // payload byte valid
  input  logic [7:0]            sm_byte_in, // payload byte
  output logic                  sm_res_vld, // one result per byte
  output logic                  sm_res_hit, // signature found
  output logic                  sm_res_multi, // several signatures found
  output logic [SM_AW-1:0]      sm_res_addr, // highest-priority entry
  output logic [SM_OFS_W-1:0]   sm_res_ofs, // offset of the last signature byte
  output logic                  sm_sec_drop, // hit not looked up (busy)
  output logic                  sm_sec_vld, // secondary result valid
  output logic                  sm_sec_hit, // header rule and signature hit
  output logic [SM_BW-1:0]      sm_sec_idx, // secondary entry
  output logic [SM_OFS_W-1:0]   sm_sec_ofs, // offset of the primary hit
  output logic                  sm_sl2_active, // stage-2 search lines driven
  output logic [SM_CW-1:0]      sm_ml2_dis_cnt, // stage-2 match-line discharges

  input  logic                  tc_aging_en, // bit<0> used for vacant/aging
  input  logic [1:0]            tc_wmode, // 72/144/288/576-bit entries
  input  logic                  tc_dx_we, // write a bank's DX entry
  input  logic [TC_BKW-1:0]     tc_dx_bank, // bank index
  input  logic [TC_DXW-1:0]     tc_dx_value, // DX digits
  input  logic [TC_DXW-1:0]     tc_dx_care, // 1 = digit compared
  input  logic                  tc_wr_en, // write a row
  input  logic [TC_AW-1:0]      tc_wr_addr, // {bank, row}
  input  logic [TC_W-1:0]       tc_wr_value, // row digits
  input  logic [TC_W-1:0]       tc_wr_care, // 1 = digit is 0/1
  input  logic                  tc_wr_vacant, // aging mode: erase (mark vacant)
  input  logic                  tc_srch, // start a search
  input  logic [TC_DXW-1:0]     tc_srch_id, // table ID (DX pins)
  input  logic                  tc_age_query, // aging query instead of lookup
  input  logic [8*TC_W-1:0]     tc_key, // search key (72 bits per row)
  input  logic [8*TC_W-1:0]     tc_kcare, // 1 = key bit compared
  output logic                  tc_res_vld, // result valid (t+3)
  output logic                  tc_res_hit, // an entry matched
  output logic [TC_AW-1:0]      tc_res_addr, // matching address
  output logic [TC_BKW:0]       tc_banks_on, // banks searched for this result

  input  alu_mode_e             fb_mode, // chip role
  input  logic                  fb_blend_en, // alpha blend enable
  input  logic                  fb_pix_vld, // pixel operation offered
  input  logic                  fb_pix_wr, // 1: draw, 0: host read
  input  logic [FB_AW-1:0]      fb_pix_addr, // pixel address
  input  pixel_t                fb_pix_in, // incoming pixel
  output logic                  fb_pix_rdy, // operation accepted this clock
  input  logic                  fb_pass_in, // Z result from a Z chip
  output logic                  fb_pass_out, // this chip's Z result
  output logic                  fb_hr_vld, // host read data valid
  output pixel_t                fb_hr_pix, // host read data
  input  logic                  fb_erase_start, // clear the whole buffer
  input  pixel_t                fb_erase_pix, // value written everywhere
  output logic                  fb_erase_busy,
  output logic                  fb_ev_zpass, // event strobes for monitoring
  output logic                  fb_ev_zfail,
  output logic                  fb_ev_hazard, // pixel held for an in-flight write
  output logic                  fb_ev_miss,
  output logic                  fb_ev_wb,
  output logic                  fb_ev_dup,

  input  logic                  flt_in_vld,   // filter input valid
  input  logic [31:0]           flt_smp [FLT_SAMPLES],  // ARGB samples
  input  logic [7:0]            flt_wgt [4][FLT_SAMPLES],  // weights per channel
  output logic                  flt_out_vld,  // filtered pixel valid
  output logic [31:0]           flt_out_pix,  // filtered ARGB
  output logic [FLT_SUMW-1:0]   flt_out_sum [4]  // raw weighted sums
);

  sigmatch_top #(.ENTRIES(SM_ENTRIES), .SEG_ROWS(SM_SEG_ROWS), .BCAM_ENTRIES(1 << SM_BW),
                 .OFS_W(SM_OFS_W)) u_sm (
    .clk,
    .rst_n,
    .cfg_enc(sm_cfg_enc),
    .cfg_hdr_bytes(sm_cfg_hdr_bytes),
    .cfg_pay_bytes(sm_cfg_pay_bytes),
    .fail_row(sm_fail_row),
    .fail_vld(sm_fail_vld),
    .prog_done(sm_prog_done),
    .tw_en(sm_tw_en),
    .tw_addr(sm_tw_addr),
    .tw_value(sm_tw_value),
    .tw_care(sm_tw_care),
    .tw_valid(sm_tw_valid),
    .tr_en(sm_tr_en),
    .tr_addr(sm_tr_addr),
    .tr_cells(sm_tr_cells),
    .tr_valid(sm_tr_valid),
    .sw_en(sm_sw_en),
    .sw_idx(sm_sw_idx),
    .sw_rule(sm_sw_rule),
    .sw_addr(sm_sw_addr),
    .sw_vld(sm_sw_vld),
    .hdr_load(sm_hdr_load),
    .hdr_in(sm_hdr_in),
    .pkt_start(sm_pkt_start),
    .byte_vld(sm_byte_vld),
    .byte_in(sm_byte_in),
    .res_vld(sm_res_vld),
    .res_hit(sm_res_hit),
    .res_multi(sm_res_multi),
    .res_addr(sm_res_addr),
    .res_ofs(sm_res_ofs),
    .sec_drop(sm_sec_drop),
    .sec_vld(sm_sec_vld),
    .sec_hit(sm_sec_hit),
    .sec_idx(sm_sec_idx),
    .sec_ofs(sm_sec_ofs),
    .sl2_active(sm_sl2_active),
    .ml2_dis_cnt(sm_ml2_dis_cnt)
  );

  tcam18_top #(.BANKS(TC_BANKS), .ROWS(TC_ROWS), .W(TC_W), .DXW(TC_DXW)) u_tc (
    .clk,
    .rst_n,
    .aging_en(tc_aging_en),
    .wmode(tc_wmode),
    .dx_we(tc_dx_we),
    .dx_bank(tc_dx_bank),
    .dx_value(tc_dx_value),
    .dx_care(tc_dx_care),
    .wr_en(tc_wr_en),
    .wr_addr(tc_wr_addr),
    .wr_value(tc_wr_value),
    .wr_care(tc_wr_care),
    .wr_vacant(tc_wr_vacant),
    .srch(tc_srch),
    .srch_id(tc_srch_id),
    .age_query(tc_age_query),
    .key(tc_key),
    .kcare(tc_kcare),
    .res_vld(tc_res_vld),
    .res_hit(tc_res_hit),
    .res_addr(tc_res_addr),
    .banks_on(tc_banks_on)
  );

  fb_top #(.BANKS(FB_BANKS), .ROWS(FB_ROWS), .PAGE_BLKS(FB_PAGE_BLKS), .LINES(FB_LINES)) u_fb (
    .clk,
    .rst_n,
    .mode(fb_mode),
    .blend_en(fb_blend_en),
    .pix_vld(fb_pix_vld),
    .pix_wr(fb_pix_wr),
    .pix_addr(fb_pix_addr),
    .pix_in(fb_pix_in),
    .pix_rdy(fb_pix_rdy),
    .pass_in(fb_pass_in),
    .pass_out(fb_pass_out),
    .hr_vld(fb_hr_vld),
    .hr_pix(fb_hr_pix),
    .erase_start(fb_erase_start),
    .erase_pix(fb_erase_pix),
    .erase_busy(fb_erase_busy),
    .ev_zpass(fb_ev_zpass),
    .ev_zfail(fb_ev_zfail),
    .ev_hazard(fb_ev_hazard),
    .ev_miss(fb_ev_miss),
    .ev_wb(fb_ev_wb),
    .ev_dup(fb_ev_dup)
  );

  msaa_filter #(.SAMPLES(FLT_SAMPLES)) u_flt (
    .clk, .rst_n, .in_vld(flt_in_vld), .smp(flt_smp), .wgt(flt_wgt),
    .out_vld(flt_out_vld), .out_pix(flt_out_pix), .out_sum(flt_out_sum)
  );
endmodule
