// Software-managed row repair on the CAM write path.
//
// The logical entries are split into segments of SEG_ROWS rows; each segment
// owns SEG_ROWS+SPARES physical rows (one redundancy set of two rows).  A
// fuse PROM gives, per segment, the failed row and a valid flag.  A magnitude
// comparator checks the incoming address against it: below the failed row
// the physical row equals the logical one, at or above it SPARES (2) is added
// so the failed row pair is skipped.  The order of rows, and thereby the
// match priority, is unchanged.  Combinational; it sits in the write/read
// address path only, never in the search path.
// Default ENTRIES is 1024, matching the default primary table size.
module red_sw_remap #(
  parameter int ENTRIES      = 1024,                   // logical rows
  parameter int SEG_ROWS = 256,                    // rows per redundancy set
  parameter int SPARES   = 2,                      // spare rows per set
  parameter int SEGS     = ENTRIES / SEG_ROWS,
  parameter int PHYS     = SEGS * (SEG_ROWS + SPARES),
  parameter int AW       = $clog2(ENTRIES),
  parameter int PW       = $clog2(PHYS),
  parameter int LW       = $clog2(SEG_ROWS)
) (
  input  logic [AW-1:0]  laddr,                // logical address
  input  logic [LW-1:0]  fail_row [SEGS],      // failed row in each segment
  input  logic           fail_vld [SEGS],      // segment uses its spares
  output logic [PW-1:0]  paddr                 // physical row
);
  always_comb begin
    int seg, loc, p;
    seg = int'(laddr) / SEG_ROWS;
    loc = int'(laddr) % SEG_ROWS;
    p   = seg * (SEG_ROWS + SPARES) + loc;
    if (fail_vld[seg] && loc >= int'(fail_row[seg]))
      p = p + SPARES;
    paddr = PW'(p);
  end
endmodule
