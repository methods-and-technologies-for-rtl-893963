// Self-checking test of z_compare: Z-pass exactly when the incoming depth
// is smaller than the stored one, equal depths fail.
module tb_z_compare;
  int checks, failures;
  logic [31:0] z_src, z_dst;
  logic z_pass;
  z_compare #(.ZW(32)) dut (.*);

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
      z_src = $urandom; z_dst = $urandom;
      if (i % 3 == 0) z_dst = z_src;
      if (i % 3 == 1) z_dst = z_src - 1;
      #1;
      check(z_pass == (z_dst < z_src), $sformatf("src %h dst %h", z_src, z_dst));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
