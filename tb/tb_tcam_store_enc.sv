// Self-checking test of tcam_store_enc: the nine encoded cell patterns of the
// 2-bit encoded storage are checked literally, and for random ternary words
// and keys the match computed from cells and search lines (no cell at 1 under
// a high search line) is compared with a direct ternary comparison, in both
// encodings.
module tb_tcam_store_enc;
  localparam int PAIRS = 8;
  int checks = 0, failures = 0;
  logic enc;
  logic [2*PAIRS-1:0] value, care, key;
  logic [PAIRS/4-1:0] bcare;
  logic [4*PAIRS-1:0] cells, sl;

  tcam_store_enc #(.PAIRS(PAIRS)) dut (.enc_mode(enc), .value(value), .care(care), .cells(cells));
  tcam_sl_gen    #(.PAIRS(PAIRS)) u_sl (.enc_mode(enc), .key(key), .byte_care(bcare), .sl(sl));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit ref_match(logic [2*PAIRS-1:0] v, logic [2*PAIRS-1:0] c,
                                   logic [2*PAIRS-1:0] k, logic [PAIRS/4-1:0] bc);
    for (int i = 0; i < 2*PAIRS; i++)
      if (bc[i/8] && c[i] && (v[i] != k[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {d,c,b,a} per stored pair: digit code 0,1,2=x for hi and lo
  function automatic logic [3:0] table62(int hi, int lo);
    logic [3:0] r;
    for (int k = 0; k < 4; k++) begin
      bit mh = (hi == 2) || (hi == (k >> 1));
      bit ml = (lo == 2) || (lo == (k & 1));
      r[k] = !(mh && ml);
    end
    return r;
  endfunction

  initial begin
    // literal rows of the encoding table, pair 0
    enc = 1'b1; key = '0; bcare = '1;
    value = '0; care = '0; #1;
    check(cells[3:0] == 4'b0000, "XX -> a=b=c=d=0");
    value[1:0] = 2'b00; care[1:0] = 2'b01; #1;      // X0
    check(cells[3:0] == 4'b1010, "X0 -> a=0 b=1 c=0 d=1");
    value[1:0] = 2'b01; care[1:0] = 2'b01; #1;      // X1
    check(cells[3:0] == 4'b0101, "X1 -> a=1 b=0 c=1 d=0");
    value[1:0] = 2'b00; care[1:0] = 2'b10; #1;      // 0X
    check(cells[3:0] == 4'b1100, "0X -> a=0 b=0 c=1 d=1");
    value[1:0] = 2'b00; care[1:0] = 2'b11; #1;      // 00
    check(cells[3:0] == 4'b1110, "00 -> a=0 b=1 c=1 d=1");
    value[1:0] = 2'b01; care[1:0] = 2'b11; #1;      // 01
    check(cells[3:0] == 4'b1101, "01 -> a=1 b=0 c=1 d=1");
    value[1:0] = 2'b10; care[1:0] = 2'b10; #1;      // 1X
    check(cells[3:0] == 4'b0011, "1X -> a=1 b=1 c=0 d=0");
    value[1:0] = 2'b10; care[1:0] = 2'b11; #1;      // 10
    check(cells[3:0] == 4'b1011, "10 -> a=1 b=1 c=0 d=1");
    value[1:0] = 2'b11; care[1:0] = 2'b11; #1;      // 11
    check(cells[3:0] == 4'b0111, "11 -> a=1 b=1 c=1 d=0");
    for (int hi = 0; hi < 3; hi++)
      for (int lo = 0; lo < 3; lo++) begin
        value[1:0] = {hi == 1, lo == 1};
        care[1:0]  = {hi != 2, lo != 2};
        #1;
        check(cells[3:0] == table62(hi, lo), $sformatf("encoded pair hi=%0d lo=%0d", hi, lo));
      end
    // conventional cells of one digit pair: "0" -> Cell_0, "1" -> Cell_1
    enc = 1'b0; value[1:0] = 2'b10; care[1:0] = 2'b11; #1;
    check(cells[3:0] == 4'b1001, "conventional 10 -> Cell_1 hi, Cell_0 lo");
    // random equivalence with a direct ternary compare
    for (int n = 0; n < 4000; n++) begin
      enc   = n[0];
      value = 16'($urandom);
      care  = 16'($urandom) | 16'($urandom);
      key   = (n % 3 == 0) ? value ^ (16'(1) << ($urandom % 16)) : 16'($urandom);
      if (n % 5 == 0) key = value;
      bcare = 2'($urandom) | 2'(n % 2);
      #1;
      check(((sl & cells) == '0) == ref_match(value, care, key, bcare),
            $sformatf("match enc=%0d v=%h c=%h k=%h", enc, value, care, key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
