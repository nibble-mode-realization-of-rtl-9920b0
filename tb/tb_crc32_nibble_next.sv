// tb_crc32_nibble_next: checks the nibble next-state network against the
// bit-serial reference: every nibble value from a set of fixed register
// values (zero, ones, single bits) and 20000 random register/nibble pairs.
module tb_crc32_nibble_next;
  timeunit 1ns; timeprecision 1ps;

  import crc32_ref_pkg::*;

  logic [31:0] crc_in, crc_out;
  logic [3:0]  data_in;
  int checks = 0, failures = 0;

  crc32_nibble_next dut (.crc_in(crc_in), .data_in(data_in), .crc_out(crc_out));

  task automatic check_one(logic [31:0] c, logic [3:0] d);
    logic [31:0] exp_v;
    crc_in  = c;
    data_in = d;
    #1;
    exp_v = ref_nibble(c, d);
    checks++;
    if (crc_out !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL crc_in=%h data=%b got %h expected %h", c, d, crc_out, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      check_one(32'h0000_0000, 4'(d));
      check_one(32'hFFFF_FFFF, 4'(d));
      for (int b = 0; b < 32; b++) check_one(32'h1 << b, 4'(d));
    end
    for (int n = 0; n < 20000; n++) check_one($urandom, 4'($urandom));
    // First step of the documented example: ones preset, nibble 0010.
    check_one(32'hFFFF_FFFF, 4'b0010);
    checks++;
    if (crc_out !== 32'hCE32_7923) begin
      failures++;
      $display("FAIL example step: got %h", crc_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
