// Hardware-managed row repair on the CAM search path.
//
// Each segment of SEG_ROWS logical rows has a shift register with one bit per
// logical row.  After reset a programming circuit reads the fuse PROM and
// issues SEG_ROWS - fail_row pulses of R_CK to the segment's register, which
// shifts a 1 in from the top each pulse; afterwards the bits of rows at and
// above the failed row are 1.  A 2:1 MUX per row then takes the match line
// of physical row (row + SPARES) instead of physical row (row), so the
// repaired segment presents its match lines to the priority encoder in the
// original order and the search path has no comparator in it.
// Interface: phys_ml (all physical match lines) -> log_ml (ENTRIES lines).
// Timing: prog_done rises SEG_ROWS+1 clocks after reset at most; the MUX is
// combinational.  Segments without a failure receive no pulse.
// Default ENTRIES is 1024, matching the default primary table size.
module red_hw_shift #(
  parameter int ENTRIES      = 1024,
  parameter int SEG_ROWS = 256,
  parameter int SPARES   = 2,
  parameter int SEGS     = ENTRIES / SEG_ROWS,
  parameter int PHYS     = SEGS * (SEG_ROWS + SPARES),
  parameter int LW       = $clog2(SEG_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LW-1:0]      fail_row [SEGS],  // fuse PROM: failed row
  input  logic               fail_vld [SEGS],  // fuse PROM: set is used
  output logic               prog_done,        // shift registers loaded
  input  logic [PHYS-1:0]    phys_ml,          // physical match lines
  output logic [ENTRIES-1:0] log_ml            // logical match lines
);
  logic [SEG_ROWS-1:0] sh [SEGS];       // 1 = row is shifted to its spare
  logic [LW:0]         pulses [SEGS];   // R_CK pulses still to send
  logic                loaded;
  logic [SEGS-1:0]     r_ck;

  // programming circuit: pulse counts are taken from the PROM after reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded <= 1'b0;
      for (int s = 0; s < SEGS; s++) begin
        pulses[s] <= '0;
        sh[s]     <= '0;
      end
    end else if (!loaded) begin
      loaded <= 1'b1;
      for (int s = 0; s < SEGS; s++)
        pulses[s] <= fail_vld[s] ? (LW+1)'(SEG_ROWS) - (LW+1)'(fail_row[s]) : '0;
    end else begin
      for (int s = 0; s < SEGS; s++) begin
        if (r_ck[s]) begin
          sh[s]     <= {1'b1, sh[s][SEG_ROWS-1:1]};
          pulses[s] <= pulses[s] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    prog_done = loaded;
    for (int s = 0; s < SEGS; s++) begin
      r_ck[s] = loaded && (pulses[s] != '0);
      if (r_ck[s]) prog_done = 1'b0;
    end
  end

  // match-line MUX
  always_comb begin
    for (int s = 0; s < SEGS; s++)
      for (int l = 0; l < SEG_ROWS; l++)
        log_ml[s*SEG_ROWS + l] = sh[s][l] ? phys_ml[s*(SEG_ROWS+SPARES) + l + SPARES]
                                          : phys_ml[s*(SEG_ROWS+SPARES) + l];
  end
endmodule
