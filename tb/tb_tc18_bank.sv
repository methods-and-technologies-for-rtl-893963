// Self-checking test of tc18_bank at 64 rows: random ternary rows searched
// in all four entry widths against a reference ternary model (lowest
// matching entry, result one clock after the search); then the aging mode:
// rows are vacant after reset and never hit, a write makes a row occupied,
// lookups set its hit flag, an aging query (all bits but <0> masked) must
// return exactly the occupied rows that were never hit, and an erased row
// stops matching.
module tb_tc18_bank;
  localparam int ROWS = 64, W = 72;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic aging_en, wr_en, wr_vacant, srch, age_query, res_hit;
  logic [1:0] wmode; logic [5:0] wr_row, res_row;
  logic [W-1:0] wr_value, wr_care;
  logic [8*W-1:0] key, kcare;

  tc18_bank #(.ROWS(ROWS), .W(W)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] rv [ROWS], rc [ROWS];
  bit vac [ROWS], hitf [ROWS];

  function automatic bit row_ok(int r);
    int seg; logic [W-1:0] k, c;
    seg = r % (1 << wmode);
    k = key[seg*W +: W]; c = kcare[seg*W +: W];
    if (!aging_en) return (((k ^ rv[r]) & rc[r] & c) == 0);
    if (vac[r]) return 0;
    if (age_query && hitf[r]) return 0;
    return (((k ^ rv[r]) & rc[r] & c) >> 1) == 0;
  endfunction

  task automatic wr(int r, logic [W-1:0] v, logic [W-1:0] c, bit vacant);
    @(negedge clk); wr_en = 1; wr_row = 6'(r); wr_value = v; wr_care = c; wr_vacant = vacant;
    rv[r] = v; rc[r] = c; vac[r] = vacant; hitf[r] = 0;
    @(negedge clk); wr_en = 0;
  endtask

  // search, check against the model, update the model's hit flags
  task automatic search(int tag);
    int k, best; bit any;
    bit gm [ROWS];
    @(negedge clk); srch = 1;
    k = 1 << wmode; any = 0; best = 0;
    for (int g = ROWS - k; g >= 0; g -= k) begin
      bit m = 1;
      for (int j = 0; j < k; j++) m &= row_ok(g + j);
      for (int j = 0; j < k; j++) gm[g + j] = m;
      if (m) begin any = 1; best = g; end
    end
    @(negedge clk); srch = 0;
    check(res_hit == any, $sformatf("search %0d hit %0d expected %0d", tag, res_hit, any));
    if (any) check(int'(res_row) == best, $sformatf("search %0d row %0d expected %0d", tag, res_row, best));
    if (aging_en && !age_query)
      for (int r = 0; r < ROWS; r++) if (gm[r]) hitf[r] = 1;
  endtask

  initial begin
    aging_en = 0; wmode = 0; wr_en = 0; wr_vacant = 0; srch = 0; age_query = 0;
    wr_row = 0; wr_value = 0; wr_care = 0; key = 0; kcare = 0;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    // plain ternary lookups in all widths
    for (int r = 0; r < ROWS; r++)
      wr(r, {$urandom, $urandom, $urandom} & {8'h0F, {64{1'b1}}}, {$urandom, $urandom, $urandom} & 72'h00_0000_0000_0000_FFFF, 0);
    for (int n = 0; n < 400; n++) begin
      wmode = 2'(n % 4);
      kcare = {8{72'h00_0000_0000_0000_FFFF}};
      for (int s = 0; s < 8; s++) begin
        int r; r = $urandom % ROWS;
        key[s*W +: W] = ($urandom % 3 == 0) ? 72'($urandom) : rv[r];
      end
      if (n % 5 == 0) for (int s = 0; s < 8; s++) key[s*W +: W] = rv[s];
      search(n);
    end
    // aging mode
    aging_en = 1; wmode = 0;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin vac[r] = 1; hitf[r] = 0; rv[r] = 0; rc[r] = 0; end
    key = '0; kcare = '0;                   // everything masked
    search(1000);                           // vacant rows never hit
    for (int r = 0; r < ROWS; r += 2)
      wr(r, 72'($urandom % 4) << 1, 72'h6, 0);   // bits 2:1 significant
    for (int n = 0; n < 6; n++) begin
      kcare = {8{72'h6}}; key = {8{72'($urandom % 4) << 1}};
      search(1100 + n);
    end
    // aging queries: bits <71:1> masked; walk the list of never-hit rows
    kcare = {8{72'h1}}; key = '0; age_query = 1;
    for (int n = 0; n < 40; n++) begin
      int r;
      search(1200 + n);
      if (!res_hit) break;
      r = int'(res_row);
      check(!vac[r] && !hitf[r] && (r % 2 == 0), "aging query returns an occupied, never-hit row");
      age_query = 0;
      wr(r, 72'h0, 72'h0, 1);               // erase it
      age_query = 1;
    end
    age_query = 0;
    key = '0; kcare = '0;
    search(1300);                           // only hit rows remain
    check(res_hit, "rows that were hit remain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
