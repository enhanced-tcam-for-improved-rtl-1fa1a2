// hec_crc8: ATM header error control (HEC) generator and checker.
//
// Computes the 8-bit CRC of the first four header bytes with generator
// polynomial x^8 + x^2 + x + 1, bits taken most significant first, CRC
// register starting at zero, and XORs the result with COSET. The polynomial
// follows the ATM cell format; the coset value 0x55 is the one the ATM
// physical layer standard (ITU-T I.432) adds, and can be set to 0 for a
// plain CRC. ok compares the computed value with a received HEC byte.
//
// Purely combinational (32 unrolled shift steps).
module hec_crc8 #(
  parameter logic [7:0] POLY  = 8'h07,  // x^8 + x^2 + x + 1 without the x^8 term
  parameter logic [7:0] COSET = 8'h55
) (
  input  logic [31:0] hdr,    // header bytes 1..4, byte 1 in bits 31:24
  input  logic [7:0]  hec_in, // received HEC byte
  output logic [7:0]  hec,    // HEC to send
  output logic        ok      // hec_in equals hec
);

  always_comb begin
    logic [7:0] crc;
    crc = '0;
    for (int i = 31; i >= 0; i--) begin
      if (crc[7] ^ hdr[i]) crc = {crc[6:0], 1'b0} ^ POLY;
      else                 crc = {crc[6:0], 1'b0};
    end
    hec = crc ^ COSET;
  end

  assign ok = (hec == hec_in);

endmodule
