// Weighted multi-sample filter: out = sum over n of Wn * Sn per channel.
//
// SAMPLES colour samples (8 bits per channel, 4 channels) are combined
// with a separate weight per sample and per channel.  Samples are taken in
// pairs through pre-add multipliers (S2k*W2k + S2k+1*W2k+1), so 16 samples
// need 8 multipliers per channel, and the products are summed.  With
// normalised weights (they add up to 2^WFRAC) the divide by the weight sum
// is a shift: the result is (sum + 2^(WFRAC-1)) >> WFRAC, saturated to
// 8 bits.  Equal weights give a box filter, other weights a tent or other
// shape.  Result registered: valid one clock after in_vld.
// WFRAC=8 (weights in 1/256) and the rounding are this design's choices.
module msaa_filter #(
  parameter int SAMPLES = 16,
  parameter int CH      = 4,
  parameter int CW      = 8,
  parameter int WW      = 8,
  parameter int WFRAC   = 8,
  parameter int SUMW    = CW + WW + $clog2(SAMPLES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_vld,
  input  logic [CH*CW-1:0]    smp [SAMPLES],      // colour samples
  input  logic [WW-1:0]       wgt [CH][SAMPLES],  // weights per channel
  output logic                out_vld,
  output logic [CH*CW-1:0]    out_pix,            // filtered colour
  output logic [SUMW-1:0]     out_sum [CH]        // raw weighted sums
);
  localparam int PAIRS = SAMPLES / 2;
  localparam int PW    = CW + WW + 1;

  logic [SUMW-1:0] sum_c [CH];

  for (genvar ch = 0; ch < CH; ch++) begin : g_ch
    logic [PW-1:0] prod [PAIRS];
    for (genvar k = 0; k < PAIRS; k++) begin : g_pair
      preadd_mult #(.N(CW), .M(WW)) u_mul (
        .a(smp[2*k][ch*CW +: CW]),   .b(wgt[ch][2*k]),
        .c(smp[2*k+1][ch*CW +: CW]), .d(wgt[ch][2*k+1]),
        .s(prod[k]));
    end
    always_comb begin
      sum_c[ch] = '0;
      for (int k = 0; k < PAIRS; k++) sum_c[ch] = sum_c[ch] + SUMW'(prod[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_vld <= 1'b0;
    else        out_vld <= in_vld;
  end

  always_ff @(posedge clk) begin
    for (int ch = 0; ch < CH; ch++) begin
      logic [SUMW:0] r;
      r = {1'b0, sum_c[ch]} + (SUMW+1)'(1 << (WFRAC-1));
      r = r >> WFRAC;
      out_sum[ch] <= sum_c[ch];
      out_pix[ch*CW +: CW] <= (r > (SUMW+1)'((1 << CW) - 1)) ? '1 : CW'(r);
    end
  end
endmodule
