// fcs_insert: appends the frame check sequence to a nibble stream.
//
// The MAC side presents the nibbles of one frame (destination address up to
// the last data nibble) on in_data with in_valid high, one nibble per clock
// and without gaps. Those nibbles are the CRC generator's input: crc_enable
// follows in_valid. Each nibble is passed to out_data one clock later with
// out_valid high. In the first clock after in_valid falls, the CRC register
// (crc) holds the final checksum; this block then takes its complement and
// sends it as 8 more nibbles right behind the data, most significant nibble
// (crc[31:28]) first, so the output frame is the codeword M(x)*x^32 + R(x)
// with the remainder R(x) complemented. In that same clock crc_init is high
// so that the CRC register is preset to ones for the next frame.
//
// Timing: out_valid/out_data lag in_valid/in_data by one clock; the FCS
// follows the last data nibble with no gap and lasts FCS_NIBBLES clocks.
// in_valid must stay low for at least 8 clocks after a frame, while the FCS
// is being sent (checked by an assertion). With exactly 8 the next output
// frame follows the FCS with no idle clock; 9 or more leave an idle clock.
// An ethernet inter-frame gap (96 bit times, 24 nibble clocks) is longer.
//
// Complementing the final value and appending it after the data field
// follow the document. Sending the FCS most significant nibble first (the
// same bit order in which the data entered the CRC), the one-clock pipeline
// and the re-preset pulse are this design's choices.
module fcs_insert
  import crc32_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // frame nibbles from the MAC
  input  logic    in_valid,
  input  nibble_t in_data,
  // CRC generator control and result
  input  crc_t    crc,
  output logic    crc_enable,
  output logic    crc_init,
  // frame with FCS appended
  output logic    out_valid,
  output nibble_t out_data
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_FCS} state_t;

  state_t                          state;
  crc_t                            fcs_sr;    // FCS nibbles still to send, MSB side first
  logic [$clog2(FCS_NIBBLES)-1:0]  fcs_left;  // nibbles left after the current one

  logic frame_end;
  assign frame_end  = (state == S_DATA) && !in_valid;

  assign crc_enable = in_valid;
  assign crc_init   = frame_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_data  <= '0;
      fcs_sr    <= '0;
      fcs_left  <= '0;
    end else if (in_valid) begin
      state     <= S_DATA;
      out_valid <= 1'b1;
      out_data  <= in_data;
    end else if (frame_end) begin
      // First FCS nibble now, the other seven from the shift register.
      state     <= S_FCS;
      out_valid <= 1'b1;
      out_data  <= ~crc[CRC_W-1 -: NIBBLE_W];
      fcs_sr    <= {~crc[CRC_W-NIBBLE_W-1:0], {NIBBLE_W{1'b0}}};
      fcs_left  <= ($clog2(FCS_NIBBLES))'(FCS_NIBBLES - 1);
    end else if (state == S_FCS) begin
      out_valid <= 1'b1;
      out_data  <= fcs_sr[CRC_W-1 -: NIBBLE_W];
      fcs_sr    <= fcs_sr << NIBBLE_W;
      fcs_left  <= fcs_left - 1'b1;
      if (fcs_left == 1) state <= S_IDLE;
    end else begin
      out_valid <= 1'b0;
    end
  end

  // A new frame may not start while the FCS of the previous one is sent.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst)
    (state == S_FCS) |-> !in_valid)
    else $error("fcs_insert: in_valid asserted during FCS transmission");

endmodule
