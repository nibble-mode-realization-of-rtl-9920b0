// nibble_crc_tx: nibble-mode CRC-32 transmit path of a 100 Mb/s ethernet MAC.
//
// The MAC presents the CRC-covered part of a frame (destination address,
// source address, length and data field) four bits per clock on txd_in with
// tx_en_in high, most significant nibble of each octet first. The nibbles go
// out unchanged on txd_out one clock later, and the 4-byte frame check
// sequence (the complemented CRC-32) follows right behind them, so tx_en_out
// is high for the frame length plus 8 clocks. crc shows the running CRC
// register of the parallel CRC-32 generator.
//
// Inside, parallel_crc_32 computes the CRC one nibble per clock (Enable =
// tx_en_in) and fcs_insert appends the FCS and re-presets the CRC register
// after each frame. The external reset also presets the register.
// The document clocks the generator at 25 MHz (100 Mb/s in nibbles).
//
// The parallel CRC generator follows the document; the FCS appending is
// written from the document's description of what happens to the final
// checksum, and the stream interface around it is this design's choice.
module nibble_crc_tx
  import crc32_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    tx_en_in,
  input  nibble_t txd_in,
  output logic    tx_en_out,
  output nibble_t txd_out,
  output crc_t    crc
);

  logic crc_enable;
  logic crc_init;

  parallel_crc_32 u_crc (
    .Clk    (clk),
    .Reset  (reset | crc_init),
    .Enable (crc_enable),
    .Data   (txd_in),
    .Crc    (crc)
  );

  fcs_insert u_fcs (
    .clk        (clk),
    .rst        (reset),
    .in_valid   (tx_en_in),
    .in_data    (txd_in),
    .crc        (crc),
    .crc_enable (crc_enable),
    .crc_init   (crc_init),
    .out_valid  (tx_en_out),
    .out_data   (txd_out)
  );

endmodule
