// tb_fcs_insert: checks the FCS appender on its own. The CRC register it
// reads is modelled here with the bit-serial reference, updated when the
// block raises crc_enable and preset when it raises crc_init. Checks:
// crc_enable follows in_valid; crc_init pulses once per frame, in the first
// clock after the frame; each output frame is its input frame delayed by one
// clock followed, with no gap, by the 8 nibbles of the complemented CRC, most
// significant first; frames separated by the shortest gap that still leaves
// an idle clock between output frames (9 clocks) are handled.
module tb_fcs_insert;
  timeunit 1ns; timeprecision 1ps;

  import crc32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        in_valid;
  logic [3:0]  in_data;
  logic [31:0] crc;
  logic        crc_enable, crc_init;
  logic        out_valid;
  logic [3:0]  out_data;

  int checks = 0, failures = 0;
  int init_pulses = 0, min_gaps = 0, frames_sent = 0;

  fcs_insert dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .crc(crc),
    .crc_enable(crc_enable), .crc_init(crc_init),
    .out_valid(out_valid), .out_data(out_data)
  );

  always #20 clk = ~clk;

  // CRC register model driven by the block's control outputs.
  always_ff @(posedge clk) begin
    if (rst || crc_init) crc <= 32'hFFFF_FFFF;
    else if (crc_enable) crc <= ref_nibble(crc, in_data);
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // Expected output frames, built when each input frame is sent.
  logic [3:0] exp_q[$][$];
  logic [3:0] cur[$];
  int         out_frames = 0;
  logic       prev_valid = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (crc_enable !== in_valid) fail("crc_enable differs from in_valid");
      if (crc_init) init_pulses++;
      if (out_valid) cur.push_back(out_data);
      if (prev_valid && !out_valid) begin
        checks++;
        if (exp_q.size() == 0) fail("unexpected output frame");
        else begin
          logic [3:0] e[$];
          e = exp_q.pop_front();
          if (e.size() != cur.size())
            fail($sformatf("frame %0d length %0d expected %0d", out_frames, cur.size(), e.size()));
          else
            foreach (e[i]) if (e[i] !== cur[i]) begin
              fail($sformatf("frame %0d nibble %0d got %h expected %h", out_frames, i, cur[i], e[i]));
              break;
            end
        end
        out_frames++;
        cur = {};
      end
      prev_valid <= out_valid;
    end
  end

  // Send one frame of len nibbles; then keep in_valid low for gap clocks.
  task automatic send_frame(int len, int gap);
    logic [3:0]  f[$];
    logic [31:0] r = 32'hFFFF_FFFF;
    for (int i = 0; i < len; i++) begin
      logic [3:0] d;
      d = 4'($urandom);
      f.push_back(d);
      r = ref_nibble(r, d);
      in_valid = 1'b1;
      in_data  = d;
      @(posedge clk);
      #1;
    end
    for (int k = 7; k >= 0; k--) f.push_back(~r[4*k +: 4]);
    exp_q.push_back(f);
    frames_sent++;
    in_valid = 1'b0;
    in_data  = 4'($urandom);
    repeat (gap) begin
      @(posedge clk);
      #1;
    end
    if (gap == 9) min_gaps++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    send_frame(1, 12);
    send_frame(120, 9);
    send_frame(37, 9);
    for (int n = 0; n < 30; n++) send_frame(1 + int'($urandom % 300), 9 + int'($urandom % 20));
    repeat (20) @(posedge clk);
    checks++;
    if (out_frames != frames_sent) fail($sformatf("%0d frames out, %0d sent", out_frames, frames_sent));
    checks++;
    if (init_pulses != frames_sent) fail($sformatf("%0d crc_init pulses for %0d frames", init_pulses, frames_sent));
    checks++;
    if (min_gaps == 0) fail("minimum gap never exercised");
    $display("frames=%0d min_gap_frames=%0d", frames_sent, min_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
