// crc32_nibble_next: one clock's worth of CRC-32 work on a 4-bit nibble.
//
// This is the combinational next-state network of the nibble-mode parallel
// CRC-32 generator. It gives, as one XOR equation per register bit, the
// value the bit-serial CRC-32 shift register would hold after taking the
// four data bits one after another, data_in[3] first and data_in[0] last
// (most significant bit first, as the bits of each octet enter the serial
// register). The equations come from unrolling that serial register four
// times and writing each bit of the result in terms of the previous register
// value and the four data bits, and are written as plain continuous
// assignments, one per bit, without loops.
//
// The register bit crc_in[28+j] always meets data bit data_in[j] in the same
// equations, so each equation is written with the shared term
// fb[j] = crc_in[28+j] ^ data_in[j]; expanding fb gives the raw equation.
// Bit k of the result is the coefficient of x^k of the running remainder;
// the polynomial is crc32_pkg::CRC_POLY (IEEE 802.3 CRC-32).
//
// Four result bits (20, 21, 30, 31) are plain copies of register bits four
// places lower: the polynomial has no taps there, so four shifts just move them.
//
// Interface: crc_in is the current register value, data_in the nibble,
// crc_out the register value after the nibble. Purely combinational, at most
// five 2-input XOR levels from any input.
//
// The equations follow from the document's polynomial and its derivation
// procedure; naming the shared terms fb is this design's choice.
module crc32_nibble_next
  import crc32_pkg::*;
(
  input  crc_t    crc_in,
  input  nibble_t data_in,
  output crc_t    crc_out
);

  // Feedback terms: register MSB side combined with the incoming bits.
  nibble_t fb;
  assign fb = crc_in[31:28] ^ data_in;

  assign crc_out[ 0] = fb[0];
  assign crc_out[ 1] = fb[1] ^ fb[0];
  assign crc_out[ 2] = fb[2] ^ fb[1] ^ fb[0];
  assign crc_out[ 3] = fb[3] ^ fb[2] ^ fb[1];
  assign crc_out[ 4] = crc_in[0] ^ fb[3] ^ fb[2] ^ fb[0];
  assign crc_out[ 5] = crc_in[1] ^ fb[3] ^ fb[1] ^ fb[0];
  assign crc_out[ 6] = crc_in[2] ^ fb[2] ^ fb[1];
  assign crc_out[ 7] = crc_in[3] ^ fb[3] ^ fb[2] ^ fb[0];
  assign crc_out[ 8] = crc_in[4] ^ fb[3] ^ fb[1] ^ fb[0];
  assign crc_out[ 9] = crc_in[5] ^ fb[2] ^ fb[1];
  assign crc_out[10] = crc_in[6] ^ fb[3] ^ fb[2] ^ fb[0];
  assign crc_out[11] = crc_in[7] ^ fb[3] ^ fb[1] ^ fb[0];
  assign crc_out[12] = crc_in[8] ^ fb[2] ^ fb[1] ^ fb[0];
  assign crc_out[13] = crc_in[9] ^ fb[3] ^ fb[2] ^ fb[1];
  assign crc_out[14] = crc_in[10] ^ fb[3] ^ fb[2];
  assign crc_out[15] = crc_in[11] ^ fb[3];
  assign crc_out[16] = crc_in[12] ^ fb[0];
  assign crc_out[17] = crc_in[13] ^ fb[1];
  assign crc_out[18] = crc_in[14] ^ fb[2];
  assign crc_out[19] = crc_in[15] ^ fb[3];
  assign crc_out[20] = crc_in[16];
  assign crc_out[21] = crc_in[17];
  assign crc_out[22] = crc_in[18] ^ fb[0];
  assign crc_out[23] = crc_in[19] ^ fb[1] ^ fb[0];
  assign crc_out[24] = crc_in[20] ^ fb[2] ^ fb[1];
  assign crc_out[25] = crc_in[21] ^ fb[3] ^ fb[2];
  assign crc_out[26] = crc_in[22] ^ fb[3] ^ fb[0];
  assign crc_out[27] = crc_in[23] ^ fb[1];
  assign crc_out[28] = crc_in[24] ^ fb[2];
  assign crc_out[29] = crc_in[25] ^ fb[3];
  assign crc_out[30] = crc_in[26];
  assign crc_out[31] = crc_in[27];

endmodule
