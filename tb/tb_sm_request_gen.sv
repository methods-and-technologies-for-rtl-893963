// Self-checking test of sm_request_gen: streams random packets of random
// length byte by byte (with idle gaps), and checks one clock after every
// byte that the key holds the header and the last 32 bytes newest-first,
// that the offset numbers the bytes from 0 within the packet, and that the
// per-byte compare mask follows the programmed header/payload lengths.
module tb_sm_request_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic hdr_load, pkt_start, byte_vld, key_vld;
  logic [31:0] hdr_in, hdr;
  logic [7:0] byte_in;
  logic [2:0] hdr_bytes;
  logic [5:0] pay_bytes;
  logic [287:0] key;
  logic [35:0] byte_care;
  logic [15:0] offset;

  sm_request_gen dut (.clk(clk), .rst_n(rst_n), .hdr_load(hdr_load), .hdr_in(hdr_in),
    .pkt_start(pkt_start), .byte_vld(byte_vld), .byte_in(byte_in), .hdr_bytes(hdr_bytes),
    .pay_bytes(pay_bytes), .key_vld(key_vld), .key(key), .byte_care(byte_care),
    .offset(offset), .hdr(hdr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte hist[$];
    logic [31:0] h;
    hdr_load = 0; pkt_start = 0; byte_vld = 0; hdr_in = 0; byte_in = 0;
    hdr_bytes = 4; pay_bytes = 32;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      int len;
      len = 1 + $urandom % 80;
      h = $urandom;
      hdr_bytes = 3'($urandom % 5);
      pay_bytes = 6'(1 + $urandom % 32);
      hist.delete();
      @(negedge clk); hdr_load = 1; hdr_in = h;
      for (int i = 0; i < len; i++) begin
        byte b;
        b = byte'($urandom);
        if (i > 0 && $urandom % 4 == 0) begin
          @(negedge clk); hdr_load = 0; pkt_start = 0; byte_vld = 0;
          @(posedge clk); #1;
          check(!key_vld, "no key without a byte");
        end
        @(negedge clk);
        pkt_start = (i == 0); byte_vld = 1; byte_in = b;
        if (i > 0) hdr_load = 0;
        hist.push_front(b);
        @(posedge clk); #1;
        check(key_vld, "key valid after byte");
        check(int'(offset) == i, $sformatf("offset %0d expected %0d", offset, i));
        check(key[287:256] == h && hdr == h, "header in key");
        for (int k = 0; k < 32; k++) begin
          byte e;
          e = (k < hist.size()) ? hist[k] : 8'h00;
          check(key[8*k +: 8] == e, $sformatf("window byte %0d", k));
          check(byte_care[k] == (k < int'(pay_bytes)), "payload care");
        end
        for (int k = 0; k < 4; k++)
          check(byte_care[32+k] == (k < int'(hdr_bytes)), "header care");
      end
      @(negedge clk); byte_vld = 0; pkt_start = 0; hdr_load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
