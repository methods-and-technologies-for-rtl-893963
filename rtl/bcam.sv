// Small binary CAM of the secondary lookup.
//
// ENTRIES words of W bits plus a valid bit.  The words are entry addresses of
// the primary TCAM; the search key is the primary result address, so a match
// says "the signature stored at that primary entry takes part in this
// secondary rule".  Write port: one word per clock.  Search: key in cycle t,
// match vector registered and valid in cycle t+1 (all matches, no
// priority).  Valid bits are cleared by reset.
module bcam #(
  parameter int ENTRIES = 16,
  parameter int W       = 12,
  parameter int IW      = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,          // write an entry
  input  logic [IW-1:0]      waddr,       // entry index
  input  logic [W-1:0]       wdata,       // stored word
  input  logic               wvalid,      // 1 store, 0 invalidate
  input  logic               srch,        // search request
  input  logic [W-1:0]       key,         // search key
  output logic               mvld,        // match vector valid
  output logic [ENTRIES-1:0] match        // entry i equals key
);
  logic [W-1:0]       mem [ENTRIES];
  logic [ENTRIES-1:0] vld;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      mvld  <= 1'b0;
      match <= '0;
    end else begin
      if (we) vld[waddr] <= wvalid;
      mvld <= srch;
      if (srch)
        for (int i = 0; i < ENTRIES; i++)
          match[i] <= vld[i] && (mem[i] == key);
    end
  end
endmodule
