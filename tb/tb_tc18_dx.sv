// Self-checking test of tc18_dx: after reset every bank is enabled; then the
// partition example of the 18 Mb TCAM (forwarding 00x0, filtering xx10 /
// 1x10, signature matching 10xx ...) and random DX patterns are programmed,
// and the bank-enable vector for every table ID is compared with a ternary
// reference.
module tb_tc18_dx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic dx_we; logic [3:0] dx_bank, dx_value, dx_care, srch_id; logic [15:0] bank_en, expv;
  logic [3:0] rv [16], rc [16];

  tc18_dx dut (.clk(clk), .rst_n(rst_n), .dx_we(dx_we), .dx_bank(dx_bank), .dx_value(dx_value),
               .dx_care(dx_care), .srch_id(srch_id), .bank_en(bank_en));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int b, logic [3:0] v, logic [3:0] c);
    @(negedge clk); dx_we = 1; dx_bank = 4'(b); dx_value = v; dx_care = c;
    rv[b] = v; rc[b] = c;
    @(negedge clk); dx_we = 0;
  endtask

  task automatic sweep();
    for (int id = 0; id < 16; id++) begin
      srch_id = 4'(id); #1;
      for (int b = 0; b < 16; b++) expv[b] = ((4'(id) ^ rv[b]) & rc[b]) == 0;
      check(bank_en == expv, $sformatf("id %0d: %h expected %h", id, bank_en, expv));
    end
  endtask

  initial begin
    dx_we = 0; dx_bank = 0; dx_value = 0; dx_care = 0; srch_id = 0;
    for (int b = 0; b < 16; b++) begin rv[b] = 0; rc[b] = 0; end
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    sweep();
    for (int b = 0; b < 4; b++) wr(b, 4'b0000, 4'b1101);       // 00x0
    wr(4, 4'b0010, 4'b0011); wr(5, 4'b0010, 4'b0011);          // xx10
    wr(6, 4'b1010, 4'b1011);                                   // 1x10
    for (int b = 7; b < 16; b++) wr(b, 4'b1000, 4'b1100);      // 10xx
    sweep();
    srch_id = 4'b0000; #1; check(bank_en == 16'h000F, "forwarding ID selects banks 0-3");
    srch_id = 4'b1000; #1; check(bank_en == 16'hFF80, "signature ID selects banks 7-15");
    srch_id = 4'b0010; #1; check(bank_en == 16'h003F, "classifying ID selects banks 0-5");
    for (int n = 0; n < 20; n++) begin
      for (int b = 0; b < 16; b++) wr(b, 4'($urandom), 4'($urandom));
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
