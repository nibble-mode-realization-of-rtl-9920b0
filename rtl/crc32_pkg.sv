// crc32_pkg: constants shared by the nibble-mode CRC-32 blocks.
//
// The generator polynomial is the IEEE 802.3 CRC-32,
//   G(x) = x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7
//          + x^5 + x^4 + x^2 + x + 1,
// written here with bit i holding the coefficient of x^i (x^32 implied).
// The register is preset to all ones before a frame, and the FCS sent is the
// complement of the final register value. A receiver that runs the whole
// frame including that FCS through the same register sees the fixed value
// CRC_RESIDUE (the remainder of x^64 + ... left by the ones preset and the
// complement), which the testbenches use as an independent check.
package crc32_pkg;

  localparam int unsigned CRC_W    = 32;   // register width
  localparam int unsigned NIBBLE_W = 4;    // bits taken per clock (MII nibble)

  localparam logic [CRC_W-1:0] CRC_POLY    = 32'h04C1_1DB7;
  localparam logic [CRC_W-1:0] CRC_INIT    = 32'hFFFF_FFFF;
  localparam logic [CRC_W-1:0] CRC_RESIDUE = 32'hC704_DD7B;

  // Number of nibbles in the appended frame check sequence (4 bytes).
  localparam int unsigned FCS_NIBBLES = CRC_W / NIBBLE_W;

  typedef logic [CRC_W-1:0]    crc_t;
  typedef logic [NIBBLE_W-1:0] nibble_t;

endpackage
