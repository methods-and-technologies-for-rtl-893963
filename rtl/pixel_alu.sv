// Seven-stage pixel ALU of the frame-buffer memory (read-modify-write).
//
// Every accepted pixel reads the stored pixel (src) from the L1 cache in
// stage 0 and writes the result back in stage 7, so the write address is
// the read address delayed by seven stages and one read and one write reach
// the cache every clock.  Stages:
//   0  cache read request (c_rd_addr = in_addr)
//   1  stored pixel arrives; Z compare (Z-pass when Z-dst < Z-src)
//   2  pass_out driven; host read data returned; update decision made
//   3  alpha blend (pre-add multipliers) and result selection
//   4-6  pipeline delay
//   7  cache write (c_wr_*)
// Modes: ALU_BOTH does depth test and blending in one chip.  ALU_ZCHIP only
// updates Z and drives pass_out; ALU_COLOR keeps its stored Z and updates
// the colour when pass_in is high, so two chips fed with the same stream
// split the work.  On a failed test the stored pixel is written back
// unchanged.  blend_en=0 replaces the colour instead of blending.
// A host read (in_wr=0) passes through without a write and returns the
// stored pixel on hr_vld/hr_pix two clocks after acceptance.  hazard is
// high when in_addr matches a write still in flight; the caller must then
// hold the pixel, since its read would see stale data.
// The stage assignment and the hazard check are this design's choices.
module pixel_alu
  import fb_pkg::*;
#(
  parameter int AW = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  alu_mode_e  mode,       // chip role
  input  logic       blend_en,   // 1: alpha blend, 0: replace colour
  input  logic       in_vld,     // accepted pixel operation
  input  logic       in_wr,      // 1: draw pixel, 0: host read
  input  logic [AW-1:0] in_addr, // pixel address
  input  pixel_t     in_pix,     // incoming (destination) pixel
  output logic       hazard,     // in_addr has a write in flight
  output logic       busy,       // some stage holds an operation
  output logic [AW-1:0] c_rd_addr, // cache read address (stage 0)
  input  pixel_t     c_rd_data,  // stored pixel, one clock after the read
  input  logic       pass_in,    // Z result from a Z chip (stage 2)
  output logic       pass_out,   // this chip's Z result (stage 2)
  output logic       c_wr_en,    // cache write (stage 7)
  output logic [AW-1:0] c_wr_addr,
  output pixel_t     c_wr_data,
  output logic       hr_vld,     // host read data valid
  output pixel_t     hr_pix,
  output logic       zpass_ev,   // a drawn pixel passed the Z test (stage 2)
  output logic       zfail_ev    // a drawn pixel failed the Z test (stage 2)
);
  localparam int ST = 7;

  logic          v   [1:ST];
  logic          wr  [1:ST];
  logic [AW-1:0] ad  [1:ST];
  pixel_t        dst [1:3];
  pixel_t        src [2:3];
  pixel_t        res [4:ST];
  logic          zp2, upd3;

  logic          zp1;
  logic [31:0]   blended;
  pixel_t        res_c;

  assign c_rd_addr = in_addr;

  // stage 1: depth compare against the stored pixel
  z_compare #(.ZW(ZW)) u_zc (.z_src(c_rd_data.z), .z_dst(dst[1].z), .z_pass(zp1));

  // stage 2 outputs
  assign pass_out = v[2] && wr[2] && zp2;
  assign hr_vld   = v[2] && !wr[2];
  assign hr_pix   = src[2];
  assign zpass_ev = v[2] && wr[2] && zp2;
  assign zfail_ev = v[2] && wr[2] && !zp2;

  // stage 3: blend and select
  a_blend #(.CH(4), .CW(8)) u_blend (
    .src({src[3].a, src[3].r, src[3].g, src[3].b}),
    .dst({dst[3].a, dst[3].r, dst[3].g, dst[3].b}),
    .alpha(dst[3].a), .res(blended));

  always_comb begin
    logic [31:0] col;
    col   = blend_en ? blended : {dst[3].a, dst[3].r, dst[3].g, dst[3].b};
    res_c = src[3];
    if (upd3) begin
      unique case (mode)
        ALU_ZCHIP: res_c.z = dst[3].z;
        ALU_COLOR: {res_c.a, res_c.r, res_c.g, res_c.b} = col;
        default: begin
          res_c.z = dst[3].z;
          {res_c.a, res_c.r, res_c.g, res_c.b} = col;
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= ST; k++) v[k] <= 1'b0;
    end else begin
      v[1] <= in_vld;
      for (int k = 2; k <= ST; k++) v[k] <= v[k-1];
    end
  end

  always_ff @(posedge clk) begin
    wr[1] <= in_wr;
    ad[1] <= in_addr;
    dst[1] <= in_pix;
    for (int k = 2; k <= ST; k++) begin
      wr[k] <= wr[k-1];
      ad[k] <= ad[k-1];
    end
    dst[2] <= dst[1];
    dst[3] <= dst[2];
    src[2] <= c_rd_data;
    src[3] <= src[2];
    zp2    <= zp1;
    upd3   <= (mode == ALU_COLOR) ? pass_in : zp2;
    res[4] <= res_c;
    for (int k = 5; k <= ST; k++) res[k] <= res[k-1];
  end

  assign c_wr_en   = v[ST] && wr[ST];
  assign c_wr_addr = ad[ST];
  assign c_wr_data = res[ST];

  always_comb begin
    hazard = 1'b0;
    busy   = 1'b0;
    for (int k = 1; k <= ST; k++) begin
      if (v[k]) busy = 1'b1;
      if (v[k] && wr[k] && ad[k] == in_addr) hazard = 1'b1;
    end
  end
endmodule
