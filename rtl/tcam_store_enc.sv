// Ternary write-data encoder for the co-processor TCAM.
//
// The TCAM stores each pair of ternary digits in four storage cells.  Two
// encodings are supported and selected by enc_mode:
//  * conventional (enc_mode=0): every digit has Cell_0 and Cell_1; "0" is
//    Cell_0=1/Cell_1=0, "1" is Cell_0=0/Cell_1=1, "x" is both 0.  Cell order
//    in a pair: {Cell_1 hi, Cell_0 hi, Cell_1 lo, Cell_0 lo}.
//  * 2-bit encoded (enc_mode=1): cells a,b,c,d belong to the four search
//    combinations 00,01,10,11 of the pair; a cell holds 1 when the stored
//    pair does NOT match its combination, so exactly the asserted search line
//    of a mismatching combination discharges the match line.  This reproduces
//    the nine-row truth table of the encoded storage (XX -> 0000, X0 -> 0101,
//    X1 -> 1010, 0X -> 0011, 00 -> 0111, 01 -> 1011, 1X -> 1100, 10 -> 1101,
//    11 -> 1110, listed as a,b,c,d).
// In both encodings an entry matches when no cell is 1 where its search line
// is high (see tcam_sl_gen), so the array compare is a single AND/OR-reduce.
// Purely combinational.  Switching enc_mode requires the table to be
// rewritten; that rule is this design's own.
module tcam_store_enc #(
  parameter int PAIRS = 144              // digit pairs per entry (288 bits)
) (
  input  logic                 enc_mode,  // 1: 2-bit encoded storage
  input  logic [2*PAIRS-1:0]   value,     // stored digit values
  input  logic [2*PAIRS-1:0]   care,      // 1 = digit is 0/1, 0 = don't care
  output logic [4*PAIRS-1:0]   cells      // four storage cells per pair
);
  always_comb begin
    cells = '0;
    for (int p = 0; p < PAIRS; p++) begin
      if (enc_mode) begin
        // cell k = 1 when combination k = {hi,lo} is not matched by the pair
        for (int k = 0; k < 4; k++)
          cells[4*p+k] = (care[2*p+1] && (value[2*p+1] != k[1])) ||
                         (care[2*p]   && (value[2*p]   != k[0]));
      end else begin
        cells[4*p+0] = care[2*p]   & ~value[2*p];    // Cell_0 lo: stores "0"
        cells[4*p+1] = care[2*p]   &  value[2*p];    // Cell_1 lo: stores "1"
        cells[4*p+2] = care[2*p+1] & ~value[2*p+1];  // Cell_0 hi
        cells[4*p+3] = care[2*p+1] &  value[2*p+1];  // Cell_1 hi
      end
    end
  end
endmodule
