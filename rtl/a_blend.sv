// Alpha-blend unit: result = (1-A)*src + A*dst for each colour channel.
//
// src is the stored colour, dst the incoming colour and A the incoming
// alpha (0..255 meaning 0..1).  Each channel (A, R, G, B) uses one
// pre-add multiplier computing src*(255-A) + dst*A in a single adder tree;
// the sum is divided by 255 with rounding as
// q = (y + (y >> 8)) >> 8 with y = sum + 128, exact for all inputs.
// Blending the alpha channel itself in the same way is this design's
// choice.  Combinational.
module a_blend #(
  parameter int CH = 4,
  parameter int CW = 8
) (
  input  logic [CH*CW-1:0] src,    // stored colour, channel 0 in low bits
  input  logic [CH*CW-1:0] dst,    // incoming colour
  input  logic [CW-1:0]    alpha,  // blend factor of the incoming colour
  output logic [CH*CW-1:0] res     // blended colour
);
  localparam logic [CW-1:0] ONE = '1;
  logic [CW-1:0] inv;
  assign inv = ONE - alpha;

  for (genvar ch = 0; ch < CH; ch++) begin : g_ch
    logic [2*CW:0] sum;
    logic [2*CW+1:0] y;
    preadd_mult #(.N(CW), .M(CW)) u_mul (
      .a(src[ch*CW +: CW]), .b(inv), .c(dst[ch*CW +: CW]), .d(alpha), .s(sum));
    assign y = {1'b0, sum} + (2*CW+2)'(1 << (CW-1));
    assign res[ch*CW +: CW] = CW'((y + (y >> CW)) >> CW);
  end
endmodule
