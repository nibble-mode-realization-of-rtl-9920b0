// parallel_crc_32: nibble-mode parallel CRC-32 generator.
//
// A 32-bit register holds the running CRC of the frame bits seen so far.
// On each rising edge of Clk:
//   - Reset high:  the register is preset to all ones (crc32_pkg::CRC_INIT),
//                  which complements the first 32 message bits as IEEE 802.3
//                  requires;
//   - else Enable high: the register takes crc32_nibble_next(Crc, Data), the
//                  value the serial CRC-32 register would hold after the four
//                  bits Data[3], Data[2], Data[1], Data[0] in that order;
//   - else:        the register holds its value.
// Crc is the register itself, so the CRC of a nibble is visible on Crc the
// cycle after that nibble is presented with Enable high. After the last
// nibble of the frame (DA up to the end of the data field), the value on Crc
// is the final checksum; the frame check sequence is its complement.
//
// Ports and their names (Data[3:0], Clk, Enable, Reset, Crc[31:0]), the ones
// preset and the nibble order follow the document; Reset being synchronous
// and taking priority over Enable is this design's choice, in keeping with
// the document's aim of putting all control on the D inputs rather than on
// the clock.
module parallel_crc_32
  import crc32_pkg::*;
(
  input  logic    Clk,
  input  logic    Reset,
  input  logic    Enable,
  input  nibble_t Data,
  output crc_t    Crc
);

  crc_t crc_next;

  crc32_nibble_next u_next (
    .crc_in  (Crc),
    .data_in (Data),
    .crc_out (crc_next)
  );

  always_ff @(posedge Clk) begin
    if (Reset)       Crc <= CRC_INIT;
    else if (Enable) Crc <= crc_next;
  end

endmodule
