// 3D frame-buffer memory: pixel ALU, L1 cache and multi-bank DRAM on one
// chip, with screen clearing by page duplication.
//
// Pixels enter with pix_vld/pix_rdy.  A pixel is accepted when its block is
// in the L1 cache, no write to the same address is still in the seven-stage
// ALU, and no clear is running.  The ALU reads the stored pixel from the
// cache, performs the depth test and alpha blend, and writes the result back
// seven clocks later.  On a miss, once the ALU has drained, the cache loads
// the block from DRAM and writes a dirty victim back in the same DRAM cycle.
// pix_wr=0 requests a host read, answered on hr_vld/hr_pix two clocks after
// acceptance.  mode and pass_in/pass_out let two chips act as Z chip and
// colour chip.
//
// Clear: erase_start waits for the ALU and cache to go idle, drops all cache
// lines, writes the erase pixel into every block of row 0 of every bank
// (BANKS x PAGE_BLKS block writes, which also leaves that page in each
// bank's sense amplifiers) and then uses DUP to copy the page into rows
// 1..ROWS-1 of all banks at one row per clock.  erase_busy is high meanwhile.
// Pixel address = {bank, row, col, pixel-in-block}; columns at or above
// PAGE_BLKS are not backed.
// The accept rules and the clear sequence are this design's choices; the
// DRAM size, bank count and page width follow the document.
// Default ROWS is 64 (the document: 1024 rows per bank, 40 Mbit).
module fb_top
  import fb_pkg::*;
#(
  parameter int BANKS     = 4,
  parameter int ROWS      = 64,
  parameter int PAGE_BLKS = 20,
  parameter int LINES     = 32,
  parameter int BKW       = (BANKS > 1) ? $clog2(BANKS) : 1,
  parameter int RW        = $clog2(ROWS),
  parameter int CLW       = $clog2(PAGE_BLKS),
  parameter int AW        = BKW + RW + CLW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  alu_mode_e     mode,         // chip role
  input  logic          blend_en,     // alpha blend enable
  input  logic          pix_vld,      // pixel operation offered
  input  logic          pix_wr,       // 1: draw, 0: host read
  input  logic [AW-1:0] pix_addr,     // pixel address
  input  pixel_t        pix_in,       // incoming pixel
  output logic          pix_rdy,      // operation accepted this clock
  input  logic          pass_in,      // Z result from a Z chip
  output logic          pass_out,     // this chip's Z result
  output logic          hr_vld,       // host read data valid
  output pixel_t        hr_pix,       // host read data
  input  logic          erase_start,  // clear the whole buffer
  input  pixel_t        erase_pix,    // value written everywhere
  output logic          erase_busy,
  output logic          ev_zpass,     // event strobes for monitoring
  output logic          ev_zfail,
  output logic          ev_hazard,    // pixel held for an in-flight write
  output logic          ev_miss,
  output logic          ev_wb,
  output logic          ev_dup
);
  localparam int BAW = AW - 3;

  typedef enum logic [2:0] {E_IDLE, E_DRAIN, E_FILL, E_DUP, E_WAIT} estate_e;
  estate_e est;
  logic [BKW-1:0] e_bank;
  logic [CLW-1:0] e_col;

  // ALU <-> cache
  logic          hazard, alu_busy, acc;
  logic [AW-1:0] c_rd_addr, c_wr_addr;
  pixel_t        c_rd_data, c_wr_data;
  logic          c_wr_en, lk_hit, fill_busy, fill_start, inv_all;

  // cache / clear <-> DRAM
  logic             cm_rd_en, cm_wr_en, m_rsp_vld;
  logic [BAW-1:0]   cm_rd_blk, cm_wr_blk;
  logic [BLK_W-1:0] cm_wr_data, m_rd_data;
  logic             e_wr, dup_start, dup_busy;

  assign erase_busy = (est != E_IDLE);
  assign pix_rdy    = !erase_busy && !erase_start && !fill_busy && lk_hit && !hazard;
  assign acc        = pix_vld && pix_rdy;
  assign fill_start = pix_vld && !erase_busy && !erase_start && !lk_hit && !alu_busy;
  assign ev_hazard  = pix_vld && !erase_busy && lk_hit && hazard && !fill_busy;

  pixel_alu #(.AW(AW)) u_alu (
    .clk, .rst_n, .mode, .blend_en,
    .in_vld(acc), .in_wr(pix_wr), .in_addr(pix_addr), .in_pix(pix_in),
    .hazard, .busy(alu_busy),
    .c_rd_addr, .c_rd_data, .pass_in, .pass_out,
    .c_wr_en, .c_wr_addr, .c_wr_data,
    .hr_vld, .hr_pix, .zpass_ev(ev_zpass), .zfail_ev(ev_zfail));

  fb_l1_cache #(.AW(AW), .LINES(LINES)) u_cache (
    .clk, .rst_n, .inv_all,
    .lk_addr(pix_addr), .lk_hit,
    .rd_addr(c_rd_addr), .rd_data(c_rd_data),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_data(c_wr_data),
    .fill_start, .fill_addr(pix_addr), .fill_busy,
    .m_rd_en(cm_rd_en), .m_rd_blk(cm_rd_blk),
    .m_wr_en(cm_wr_en), .m_wr_blk(cm_wr_blk), .m_wr_data(cm_wr_data),
    .m_rsp_vld, .m_rd_data, .miss_ev(ev_miss), .wb_ev(ev_wb));

  fb_dram #(.BANKS(BANKS), .ROWS(ROWS), .PAGE_BLKS(PAGE_BLKS)) u_dram (
    .clk, .rst_n,
    .rd_en(cm_rd_en), .rd_blk(cm_rd_blk),
    .wr_en(cm_wr_en || e_wr),
    .wr_blk(e_wr ? {e_bank, RW'(0), e_col} : cm_wr_blk),
    .wr_data(e_wr ? {BLK_PIX{erase_pix}} : cm_wr_data),
    .rsp_vld(m_rsp_vld), .rd_data(m_rd_data),
    .dup_start, .dup_row0(RW'(1)), .dup_rows((RW+1)'(ROWS - 1)),
    .dup_busy, .dup_ev(ev_dup));

  assign inv_all   = (est == E_DRAIN) && !alu_busy && !fill_busy;
  assign e_wr      = (est == E_FILL);
  assign dup_start = (est == E_DUP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est    <= E_IDLE;
      e_bank <= '0;
      e_col  <= '0;
    end else begin
      unique case (est)
        E_IDLE:  if (erase_start) est <= E_DRAIN;
        E_DRAIN: if (!alu_busy && !fill_busy) begin
          est    <= E_FILL;
          e_bank <= '0;
          e_col  <= '0;
        end
        E_FILL: begin
          if (32'(e_col) == PAGE_BLKS - 1) begin
            e_col <= '0;
            if (32'(e_bank) == BANKS - 1) est <= E_DUP;
            else e_bank <= e_bank + 1'b1;
          end else begin
            e_col <= e_col + 1'b1;
          end
        end
        E_DUP:   est <= E_WAIT;
        default: if (!dup_busy) est <= E_IDLE;
      endcase
    end
  end
endmodule
