// Priority encoder for CAM match lines.
//
// When several entries match at once the lowest address wins (entries are
// stored in decreasing order of priority, e.g. longest prefix first).
// Outputs the winning index, a hit flag and a flag for more than one match.
// Combinational; written as a downward scan so that the last assignment, the
// lowest matching index, wins.
// Default N is 1024, matching the default primary table size.
module prio_enc #(
  parameter int N  = 1024,                       // number of match lines
  parameter int AW = (N > 1) ? $clog2(N) : 1     // index width
) (
  input  logic [N-1:0]  req,     // match lines, bit i = entry i
  output logic          hit,     // at least one match
  output logic          multi,   // more than one match
  output logic [AW-1:0] idx      // lowest matching index (0 when no hit)
);
  always_comb begin
    int cnt;
    idx = '0;
    cnt = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx = AW'(i);
        cnt = (cnt < 2) ? cnt + 1 : cnt;
      end
    end
    hit   = (cnt != 0);
    multi = (cnt > 1);
  end
endmodule
