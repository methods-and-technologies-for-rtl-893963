// Search-line generator for the co-processor TCAM.
//
// Produces four search lines per pair of key bits, matching the cell order
// of tcam_store_enc:
//  * conventional (enc_mode=0): SL and /SL for each bit; two of the four
//    lines of a pair are high for every search.
//  * 2-bit encoded (enc_mode=1): one line per combination 00/01/10/11 of
//    the bit pair; only one of the four lines is high, which halves the
//    search-line switching.
// A search mask with one bit per byte (a signature is masked byte-wise)
// holds all lines of a masked byte low, so that byte always matches.
// Purely combinational.
module tcam_sl_gen #(
  parameter int PAIRS = 144                     // pairs (key bits / 2)
) (
  input  logic                  enc_mode,        // 1: one-hot encoded SLs
  input  logic [2*PAIRS-1:0]    key,             // search request data
  input  logic [PAIRS/4-1:0]    byte_care,       // 1 = byte is compared
  output logic [4*PAIRS-1:0]    sl               // search lines
);
  always_comb begin
    sl = '0;
    for (int p = 0; p < PAIRS; p++) begin
      if (byte_care[p/4]) begin
        if (enc_mode) begin
          for (int k = 0; k < 4; k++)
            sl[4*p+k] = (key[2*p+1 -: 2] == 2'(k));
        end else begin
          sl[4*p+0] =  key[2*p];      // SL lo: discharges on a stored "0"
          sl[4*p+1] = ~key[2*p];      // /SL lo: discharges on a stored "1"
          sl[4*p+2] =  key[2*p+1];
          sl[4*p+3] = ~key[2*p+1];
        end
      end
    end
  end
endmodule
