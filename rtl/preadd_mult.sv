// Pre-add multiplier: S = A*B + C*D in one adder tree.
//
// Instead of two multipliers and a final adder, the pre-adder forms A+C
// once; for every bit position j of B and D a 4:1 MUX chooses the partial
// product 0, A, C or A+C from the bit pair (b_j, d_j), and the M partial
// products, each shifted by j, are summed in a single tree.  This needs about
// mn+m+n adder cells instead of 2mn+m+n+1.  Used for alpha blending
// ((1-A)*src + A*dst) and for weighted multi-sample filtering.
// Unsigned, combinational; the result has N+M+1 bits.
module preadd_mult #(
  parameter int N = 8,           // width of A and C
  parameter int M = 8            // width of B and D
) (
  input  logic [N-1:0]   a,      // first multiplicand
  input  logic [M-1:0]   b,      // its multiplier
  input  logic [N-1:0]   c,      // second multiplicand
  input  logic [M-1:0]   d,      // its multiplier
  output logic [N+M:0]   s       // a*b + c*d
);
  logic [N:0]   ac;              // pre-added A+C
  logic [N:0]   pp [M];          // partial products

  assign ac = {1'b0, a} + {1'b0, c};

  always_comb begin
    for (int j = 0; j < M; j++) begin
      unique case ({b[j], d[j]})
        2'b00: pp[j] = '0;
        2'b10: pp[j] = {1'b0, a};
        2'b01: pp[j] = {1'b0, c};
        default: pp[j] = ac;
      endcase
    end
    s = '0;
    for (int j = 0; j < M; j++)
      s = s + ((N+M+1)'(pp[j]) << j);
  end
endmodule
