// Self-checking test of sm_lop: random rules of every relation on random
// headers (with values chosen near the field value so that =, <, > all
// occur); the pass vector is compared with an independent evaluation, done
// must come exactly four clocks after start, busy must cover the clocks in
// between and a new check must be accepted back to back.
module tb_sm_lop;
  import sm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [31:0] hdr_in;
  lop_rule_t rules [16];
  logic [15:0] pass;

  sm_lop dut (.clk(clk), .rst_n(rst_n), .start(start), .hdr_in(hdr_in), .rules(rules),
              .busy(busy), .done(done), .pass(pass));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit ref_rule(lop_rule_t r, logic [31:0] h);
    longint unsigned a = longint'(h & r.mask), b = longint'(r.value);
    case (r.op)
      LOP_EQ: return a == b;
      LOP_NE: return a != b;
      LOP_GT: return a > b;
      LOP_GE: return a >= b;
      LOP_LT: return a < b;
      LOP_LE: return a <= b;
      default: return 1;
    endcase
  endfunction

  initial begin
    start = 0; hdr_in = 0;
    for (int i = 0; i < 16; i++) rules[i] = '{op: LOP_ANY, mask: '0, value: '0};
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] h;
      logic [15:0] expv;
      h = $urandom;
      for (int i = 0; i < 16; i++) begin
        logic [31:0] m;
        m = (i % 2) ? 32'hFFFF0000 : 32'h0000FFFF;
        rules[i].op    = lop_op_e'($urandom % 7);
        rules[i].mask  = m;
        case ($urandom % 3)
          0: rules[i].value = h & m;
          1: rules[i].value = (h & m) + (m & 32'h00010001);
          default: rules[i].value = (h & m) - (m & 32'h00010001);
        endcase
        expv[i] = ref_rule(rules[i], h);
      end
      @(negedge clk); start = 1; hdr_in = h;
      @(negedge clk); start = 0; hdr_in = $urandom;  // header is sampled at start
      for (int c = 1; c < 4; c++) begin
        check(busy && !done, $sformatf("busy in clock %0d", c));
        @(negedge clk);
      end
      check(done && !busy, "done 4 clocks after start");
      check(pass == expv, $sformatf("pass %h expected %h", pass, expv));
      if (n % 2) begin @(negedge clk); check(!done, "done is a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
