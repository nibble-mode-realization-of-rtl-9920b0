// tb_nibble_crc_tx: end-to-end test of the nibble-mode CRC-32 transmit path.
//
// Ethernet frames are built as octets (destination and source address,
// length, data field of 46 to 1500 octets) and sent as nibbles, high nibble
// of each octet first, one per clock. For every frame the output must be the
// same nibbles, one clock later, followed at once by the FCS: the complement
// of the CRC-32 computed octet by octet with the bit-serial reference. Every
// output frame, FCS included, run through the reference must leave the fixed
// receiver residue C704DD7B. The 9-octet string "123456789" must give the
// FCS FC891918. The CRC register output must hold the reference CRC in the
// clock after the last nibble, and tx_en_out must be high for exactly the
// frame length plus 8 clocks.
//
// Each mechanism is counted and must occur at least once: preset by reset,
// re-preset between frames, FCS appended, minimum and maximum frame size,
// minimum gap between frames.
module tb_nibble_crc_tx;
  timeunit 1ns; timeprecision 1ps;

  import crc32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic        tx_en_in;
  logic [3:0]  txd_in;
  logic        tx_en_out;
  logic [3:0]  txd_out;
  logic [31:0] crc;

  int checks = 0, failures = 0;
  int n_reset_preset = 0, n_represet = 0, n_fcs = 0, n_min = 0, n_max = 0, n_min_gap = 0;

  nibble_crc_tx dut (
    .clk(clk), .reset(reset), .tx_en_in(tx_en_in), .txd_in(txd_in),
    .tx_en_out(tx_en_out), .txd_out(txd_out), .crc(crc)
  );

  always #20 clk = ~clk;   // 25 MHz nibble clock

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // ---- output monitor ----
  logic [3:0] exp_q[$][$];
  logic [3:0] cur[$];
  int         out_frames = 0;
  logic       prev_valid = 1'b0;

  always @(posedge clk) begin
    if (!reset) begin
      if (tx_en_out) cur.push_back(txd_out);
      if (prev_valid && !tx_en_out) begin
        logic [3:0]  e[$];
        logic [31:0] r;
        checks++;
        if (exp_q.size() == 0) fail("unexpected output frame");
        else begin
          e = exp_q.pop_front();
          if (e.size() != cur.size())
            fail($sformatf("frame %0d length %0d expected %0d", out_frames, cur.size(), e.size()));
          else
            foreach (e[i]) if (e[i] !== cur[i]) begin
              fail($sformatf("frame %0d nibble %0d got %h expected %h", out_frames, i, cur[i], e[i]));
              break;
            end
        end
        // receiver view: the whole codeword leaves the fixed residue
        r = 32'hFFFF_FFFF;
        foreach (cur[i]) r = ref_nibble(r, cur[i]);
        checks++;
        if (r !== 32'hC704_DD7B) fail($sformatf("frame %0d residue %h", out_frames, r));
        else n_fcs++;
        out_frames++;
        cur = {};
      end
      prev_valid <= tx_en_out;
    end
  end

  // ---- stimulus ----
  // Send the octets in bytes, then hold tx_en_in low for gap clocks.
  // Returns the complemented CRC (the FCS) computed octet by octet.
  task automatic send_frame(input logic [7:0] bytes[$], input int gap,
                            output logic [31:0] fcs);
    logic [3:0]  f[$];
    logic [31:0] r = 32'hFFFF_FFFF;
    int          first_out;
    foreach (bytes[i]) r = ref_byte(r, bytes[i]);
    fcs = ~r;
    checks++;
    if (crc !== 32'hFFFF_FFFF) fail("CRC register not preset before frame");
    foreach (bytes[i]) begin
      f.push_back(bytes[i][7:4]);
      f.push_back(bytes[i][3:0]);
    end
    for (int k = 7; k >= 0; k--) f.push_back(fcs[4*k +: 4]);
    exp_q.push_back(f);
    foreach (bytes[i]) begin
      for (int h = 1; h >= 0; h--) begin
        tx_en_in = 1'b1;
        txd_in   = bytes[i][4*h +: 4];
        @(posedge clk);
        #1;
        if (i == 0 && h == 1) begin
          checks++;
          if (tx_en_out !== 1'b1) fail("tx_en_out not high one clock after tx_en_in");
        end
      end
    end
    tx_en_in = 1'b0;
    txd_in   = 4'($urandom);
    checks++;
    if (crc !== r) fail($sformatf("CRC register %h after frame, expected %h", crc, r));
    // tx_en_out stays high for the last data nibble and the 8 FCS nibbles
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (tx_en_out !== 1'b1) fail("tx_en_out dropped during FCS");
      @(posedge clk);
      #1;
      if (k == 0) begin
        checks++;
        if (crc !== 32'hFFFF_FFFF) fail("CRC register not re-preset after frame");
        else n_represet++;
      end
    end
    checks++;
    if (tx_en_out !== 1'b0) fail("tx_en_out still high after FCS");
    repeat (gap - 9) begin
      @(posedge clk);
      #1;
    end
    if (gap == 9) n_min_gap++;
  endtask

  function automatic void eth_frame(int data_len, output logic [7:0] b[$]);
    b = {};
    for (int i = 0; i < 12; i++) b.push_back(8'($urandom));   // DA, SA
    b.push_back(8'(data_len >> 8));                          // length
    b.push_back(8'(data_len));
    for (int i = 0; i < data_len; i++) b.push_back(8'($urandom));
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  b[$];
    logic [31:0] fcs;
    string       s;
    int          len;
    reset = 1'b1; tx_en_in = 1'b0; txd_in = '0;
    repeat (3) @(posedge clk);
    #1;
    reset = 1'b0;
    checks++;
    if (crc !== 32'hFFFF_FFFF) fail("CRC register not preset by reset");
    else n_reset_preset++;

    // standard check string
    s = "123456789";
    b = {};
    for (int i = 0; i < s.len(); i++) b.push_back(s[i]);
    send_frame(b, 24, fcs);
    checks++;
    if (fcs !== 32'hFC89_1918) fail($sformatf("check string FCS %h", fcs));

    // minimum and maximum ethernet frames
    eth_frame(46, b);   send_frame(b, 9, fcs);  n_min++;
    eth_frame(1500, b); send_frame(b, 9, fcs);  n_max++;
    eth_frame(46, b);   send_frame(b, 24, fcs); n_min++;

    // random sizes and gaps
    for (int n = 0; n < 20; n++) begin
      len = 46 + int'($urandom % 1455);
      eth_frame(len, b);
      send_frame(b, 9 + int'($urandom % 30), fcs);
    end

    // reset between frames, then one more frame
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    checks++;
    if (crc !== 32'hFFFF_FFFF) fail("CRC register not preset by reset");
    else n_reset_preset++;
    eth_frame(1500, b); send_frame(b, 24, fcs); n_max++;

    repeat (10) @(posedge clk);
    checks++;
    if (out_frames != 25) fail($sformatf("%0d frames out, 25 sent", out_frames));
    $display("reset_preset=%0d represet=%0d fcs_appended=%0d min_frames=%0d max_frames=%0d min_gap=%0d",
             n_reset_preset, n_represet, n_fcs, n_min, n_max, n_min_gap);
    checks += 6;
    if (n_reset_preset == 0) fail("reset preset never happened");
    if (n_represet == 0)     fail("re-preset never happened");
    if (n_fcs == 0)          fail("FCS never appended");
    if (n_min == 0)          fail("minimum frame never sent");
    if (n_max == 0)          fail("maximum frame never sent");
    if (n_min_gap == 0)      fail("minimum gap never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
