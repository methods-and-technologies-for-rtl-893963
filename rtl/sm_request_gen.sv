// Search-request generator of the signature-matching co-processor.
//
// Instead of bringing 288 search bits in through pins every clock, the
// header is loaded once per packet into a header register, and the payload
// part of the key is a 32-byte shift register that takes one packet byte per
// clock.  After every shift a search is issued with the key
// {header, payload window}, so every byte position of the payload is checked
// against every stored signature.  An offset counter numbers the packet bytes
// so a hit can be reported with its position.
//
// Window layout (this design's choice): key byte 0 (bits 7:0) is the newest
// byte, key byte i the byte received i clocks earlier; the header occupies
// key bits 287:256.  A signature is therefore stored with its last character
// in byte 0, and a hit's offset is the position of its last character.
// Programmable lengths: the low hdr_bytes bytes of the header and the newest
// pay_bytes bytes of the window are compared, the rest is masked (byte_care).
// pkt_start clears the window and the offset counter.
// Timing: a byte accepted in cycle t gives key_vld in cycle t+1 with the key
// and that byte's offset.
module sm_request_gen #(
  parameter int HDR_W     = 32,
  parameter int PAY_BYTES = 32,
  parameter int OFS_W     = 16,
  parameter int KEY_W     = HDR_W + 8 * PAY_BYTES,
  parameter int KB        = KEY_W / 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hdr_load,     // load header register
  input  logic [HDR_W-1:0] hdr_in,       // packet header field
  input  logic             pkt_start,    // new packet: clear window/offset
  input  logic             byte_vld,     // payload byte present
  input  logic [7:0]       byte_in,      // payload byte
  input  logic [2:0]       hdr_bytes,    // header bytes compared (0..4)
  input  logic [5:0]       pay_bytes,    // payload bytes compared (1..32)
  output logic             key_vld,      // search request valid
  output logic [KEY_W-1:0] key,          // {header, payload window}
  output logic [KB-1:0]    byte_care,    // per-byte compare enable
  output logic [OFS_W-1:0] offset,       // offset of the newest byte
  output logic [HDR_W-1:0] hdr           // header register (to secondary)
);
  logic [8*PAY_BYTES-1:0] win;
  logic [OFS_W-1:0]       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr     <= '0;
      win     <= '0;
      cnt     <= '0;
      key_vld <= 1'b0;
      offset  <= '0;
    end else begin
      if (hdr_load) hdr <= hdr_in;
      key_vld <= byte_vld;
      if (pkt_start) begin
        win <= byte_vld ? {{(8*PAY_BYTES-8){1'b0}}, byte_in} : '0;
        cnt <= byte_vld ? OFS_W'(1) : '0;
        offset <= '0;
      end else if (byte_vld) begin
        win    <= {win[8*PAY_BYTES-9:0], byte_in};
        cnt    <= cnt + 1'b1;
        offset <= cnt;
      end
    end
  end

  assign key = {hdr, win};

  always_comb begin
    for (int b = 0; b < PAY_BYTES; b++)
      byte_care[b] = (b < int'(pay_bytes));
    for (int h = 0; h < HDR_W / 8; h++)
      byte_care[PAY_BYTES + h] = (h < int'(hdr_bytes));
  end
endmodule
