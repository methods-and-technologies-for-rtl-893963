// Shared types and sizes of the 3D frame-buffer memory.
//
// A pixel is 64 bits: a 32-bit depth Z and a 32-bit colour with 8-bit
// A (transparency), R, G and B.  The DRAM exchanges blocks of 8 pixels with
// the L1 cache (8 pixels per clock for the source read and 8 for the result
// write).  The pixel ALU mode selects how a chip is used: as a single chip
// doing depth test and blending (ALU_BOTH), as the Z chip of a pair that
// only updates Z and drives pass_out, or as the colour chip that blends
// according to pass_in.
package fb_pkg;

  localparam int ZW        = 32;
  localparam int PIX_W     = 64;
  localparam int BLK_PIX   = 8;              // pixels per DRAM block
  localparam int BLK_W     = PIX_W * BLK_PIX;  // 512-bit block

  typedef struct packed {
    logic [ZW-1:0] z;
    logic [7:0]    a;
    logic [7:0]    r;
    logic [7:0]    g;
    logic [7:0]    b;
  } pixel_t;

  typedef enum logic [1:0] {
    ALU_BOTH  = 2'd0,
    ALU_ZCHIP = 2'd1,
    ALU_COLOR = 2'd2
  } alu_mode_e;

endpackage
