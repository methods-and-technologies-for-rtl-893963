// Self-checking test of msaa_filter: random samples and weights per
// channel; the raw sum must be sum(Wn*Sn) and the pixel the rounded sum
// >> 8 saturated to 255, both one clock after in_vld.  A box filter
// (all weights 16) must give the rounded mean.
module tb_msaa_filter;
  int checks, failures;
  logic clk = 0, rst_n = 0, in_vld = 0, out_vld;
  logic [31:0] smp [16];
  logic [7:0]  wgt [4][16];
  logic [31:0] out_pix;
  logic [19:0] out_sum [4];
  msaa_filter #(.SAMPLES(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      int sum, exp;
      @(negedge clk);
      for (int n = 0; n < 16; n++) begin
        smp[n] = $urandom;
        for (int ch = 0; ch < 4; ch++) wgt[ch][n] = (it % 2) ? 8'd16 : 8'($urandom % 40);
      end
      in_vld = 1;
      @(negedge clk);
      in_vld = 0;
      check(out_vld, "out_vld one clock after in_vld");
      for (int ch = 0; ch < 4; ch++) begin
        sum = 0;
        for (int n = 0; n < 16; n++) sum += wgt[ch][n] * smp[n][ch*8 +: 8];
        exp = (sum + 128) >> 8;
        if (exp > 255) exp = 255;
        check(out_sum[ch] == 20'(sum), $sformatf("sum ch%0d %0d exp %0d", ch, out_sum[ch], sum));
        check(out_pix[ch*8 +: 8] == 8'(exp), $sformatf("pix ch%0d %0d exp %0d", ch, out_pix[ch*8 +: 8], exp));
      end
      @(negedge clk);
      check(!out_vld, "out_vld is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
