// DX pre-search of the 18 Mb TCAM (flexible partitioning).
//
// Every bank carries one extended-data (DX) entry of DXW ternary bits, which
// names the lookup table(s) the bank belongs to; a don't-care bit lets one
// bank serve several tables.  The search request brings a DXW-bit table ID
// on extra pins; in the first pipeline stage each DX entry is compared with
// it, and only banks whose DX matched are searched in the next stage.  This
// gives table sizes that are any multiple of a bank and removes the power of
// banks that do not hold the table.
// Interface: one DX entry written per clock; bank_en is combinational from
// srch_id.  Reset leaves every DX all-don't-care (every bank in every
// table), a choice of this design.
module tc18_dx #(
  parameter int BANKS = 16,
  parameter int DXW   = 4,
  parameter int BW    = $clog2(BANKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dx_we,        // write a bank's DX entry
  input  logic [BW-1:0]    dx_bank,      // bank index
  input  logic [DXW-1:0]   dx_value,     // DX digits
  input  logic [DXW-1:0]   dx_care,      // 1 = digit compared, 0 = x
  input  logic [DXW-1:0]   srch_id,      // table ID of the search
  output logic [BANKS-1:0] bank_en       // bank takes part in the search
);
  logic [DXW-1:0] val [BANKS];
  logic [DXW-1:0] care [BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < BANKS; b++) begin
        val[b]  <= '0;
        care[b] <= '0;
      end
    end else if (dx_we) begin
      val[dx_bank]  <= dx_value;
      care[dx_bank] <= dx_care;
    end
  end

  always_comb
    for (int b = 0; b < BANKS; b++)
      bank_en[b] = (((srch_id ^ val[b]) & care[b]) == '0);
endmodule
