// Self-checking test of prio_enc: random and sparse match vectors; the lowest
// set index, the hit flag and the multiple-match flag are compared with a
// reference scan.
module tb_prio_enc;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic [N-1:0] req;
  logic hit, multi;
  logic [5:0] idx;

  prio_enc #(.N(N)) dut (.req(req), .hit(hit), .multi(multi), .idx(idx));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int first, cnt;
      case (n % 4)
        0: req = '0;
        1: req = N'(1) << ($urandom % N);
        2: req = {$urandom, $urandom};
        default: req = (N'(1) << ($urandom % N)) | (N'(1) << ($urandom % N));
      endcase
      #1;
      first = -1; cnt = 0;
      for (int i = 0; i < N; i++) if (req[i]) begin if (first < 0) first = i; cnt++; end
      check(hit == (cnt > 0), "hit flag");
      check(multi == (cnt > 1), "multi flag");
      if (cnt > 0) check(int'(idx) == first, $sformatf("index %0d expected %0d", idx, first));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
