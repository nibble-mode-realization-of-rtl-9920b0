// tb_parallel_crc_32: checks the nibble-mode CRC-32 generator.
//  1. The published example: after Reset, nibbles 0010, 1011, 0100, 1101,
//     0110 give CE327923, FD60C235, FD47E831, DDFCB87E, F4804C81, each one
//     clock after its nibble (one nibble per clock).
//  2. Enable low holds the register; Reset presets it to ones.
//  3. The string "123456789" (two nibbles per octet, high nibble first)
//     gives a complemented CRC of FC891918, the standard check value of this
//     CRC-32 variant (non-reflected, ones preset, complemented result).
//  4. Random frames with random Enable gaps against the bit-serial model.
module tb_parallel_crc_32;
  timeunit 1ns; timeprecision 1ps;

  import crc32_ref_pkg::*;

  logic        Clk = 0;
  logic        Reset, Enable;
  logic [3:0]  Data;
  logic [31:0] Crc;
  int checks = 0, failures = 0, cycles = 0;

  parallel_crc_32 dut (.Clk(Clk), .Reset(Reset), .Enable(Enable), .Data(Data), .Crc(Crc));

  always #20 Clk = ~Clk;   // 25 MHz
  always @(posedge Clk) cycles++;

  task automatic expect_crc(logic [31:0] e, string what);
    checks++;
    if (Crc !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, Crc, e);
    end
  endtask

  // Present one nibble for one clock and return after the edge.
  task automatic drive(logic en, logic [3:0] d);
    Enable = en;
    Data   = d;
    @(posedge Clk);
    #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    logic [3:0]  ex_d[5];
    logic [31:0] ex_c[5];
    string       s;
    int          c0, len, enabled;
    logic        en;
    logic [3:0]  d;

    ex_d = '{4'b0010, 4'b1011, 4'b0100, 4'b1101, 4'b0110};
    ex_c = '{32'hCE327923, 32'hFD60C235, 32'hFD47E831, 32'hDDFCB87E, 32'hF4804C81};
    s = "123456789";
    enabled = 0;

    Reset = 1; Enable = 0; Data = '0;
    repeat (2) @(posedge Clk);
    #1;
    expect_crc(32'hFFFFFFFF, "preset");
    Reset = 0;

    // 1. example sequence, one nibble per clock
    c0 = cycles;
    for (int i = 0; i < 5; i++) begin
      drive(1, ex_d[i]);
      expect_crc(ex_c[i], $sformatf("example nibble %0d", i));
    end
    checks++;
    if (cycles - c0 != 5) begin
      failures++;
      $display("FAIL example took %0d clocks, expected 5", cycles - c0);
    end

    // 2. hold with Enable low, then preset
    repeat (3) drive(0, 4'($urandom));
    expect_crc(32'hF4804C81, "hold");
    Reset = 1;
    drive(1, 4'hA);          // Reset wins over Enable
    expect_crc(32'hFFFFFFFF, "reset over enable");
    Reset = 0;

    // 3. check string
    for (int i = 0; i < s.len(); i++) begin
      drive(1, s[i][7:4]);
      drive(1, s[i][3:0]);
    end
    checks++;
    if (~Crc !== 32'hFC891918) begin
      failures++;
      $display("FAIL check string: ~Crc=%h expected FC891918", ~Crc);
    end

    // 4. random frames with gaps
    for (int f = 0; f < 40; f++) begin
      Reset = 1;
      drive(0, 4'h0);
      Reset = 0;
      model = 32'hFFFFFFFF;
      len = 50 + int'($urandom % 200);
      for (int n = 0; n < len; n++) begin
        en = ($urandom % 4) != 0;
        d  = 4'($urandom);
        enabled += int'(en);
        drive(en, d);
        if (en) model = ref_nibble(model, d);
        expect_crc(model, $sformatf("frame %0d nibble %0d", f, n));
      end
    end

    checks++;
    if (enabled < 1000) begin
      failures++;
      $display("FAIL only %0d enabled random nibbles", enabled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
