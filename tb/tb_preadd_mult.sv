// Self-checking test of preadd_mult: random and corner operands, the
// result must equal a*b + c*d exactly (combinational, no latency).
module tb_preadd_mult;
  int checks, failures;
  logic [7:0] a, b, c, d;
  logic [16:0] s;
  preadd_mult #(.N(8), .M(8)) dut (.*);

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
    for (int i = 0; i < 4000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      if (i < 4) begin a = '1; b = '1; c = '1; d = '1; end
      if (i == 4) begin a = 0; c = 0; end
      #1;
      check(s == 17'(a) * 17'(b) + 17'(c) * 17'(d),
            $sformatf("%0d*%0d+%0d*%0d gave %0d", a, b, c, d, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
