// Self-checking test of a_blend: every channel must equal
// round(((255-A)*src + A*dst) / 255); A=0 keeps src, A=255 gives dst.
module tb_a_blend;
  int checks, failures;
  logic [31:0] src, dst, res;
  logic [7:0]  alpha;
  a_blend #(.CH(4), .CW(8)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      src = $urandom; dst = $urandom; alpha = $urandom;
      if (i % 10 == 0) alpha = 0;
      if (i % 10 == 1) alpha = 255;
      #1;
      for (int ch = 0; ch < 4; ch++) begin
        int num, exp;
        num = (255 - alpha) * src[ch*8 +: 8] + alpha * dst[ch*8 +: 8];
        exp = (2 * num + 255) / 510;
        check(res[ch*8 +: 8] == exp[7:0],
              $sformatf("ch%0d src %0d dst %0d a %0d: %0d exp %0d", ch,
                        src[ch*8 +: 8], dst[ch*8 +: 8], alpha, res[ch*8 +: 8], exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
