// crc32_ref_pkg: bit-serial CRC-32 reference model for the testbenches.
//
// Models the serial shift register with one flip-flop per remainder bit:
// each step shifts the register up by one and, when the bit leaving bit 31
// differs from the incoming message bit, adds the generator polynomial
//   G(x) = x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1.
// The tap mask is built here from that list of exponents, not taken from the
// design, so the nibble equations in the design are checked against an
// independent one-bit-per-step model.
package crc32_ref_pkg;

  function automatic logic [31:0] ref_poly();
    int exps[14] = '{26, 23, 22, 16, 12, 11, 10, 8, 7, 5, 4, 2, 1, 0};
    logic [31:0] p = '0;
    foreach (exps[i]) p[exps[i]] = 1'b1;
    return p;
  endfunction

  // One serial step with message bit b.
  function automatic logic [31:0] ref_step(logic [31:0] c, logic b);
    logic fb = c[31] ^ b;
    c = c << 1;
    if (fb) c ^= ref_poly();
    return c;
  endfunction

  // A nibble, taken most significant bit first.
  function automatic logic [31:0] ref_nibble(logic [31:0] c, logic [3:0] d);
    for (int i = 3; i >= 0; i--) c = ref_step(c, d[i]);
    return c;
  endfunction

  // An octet, most significant bit first.
  function automatic logic [31:0] ref_byte(logic [31:0] c, logic [7:0] b);
    for (int i = 7; i >= 0; i--) c = ref_step(c, b[i]);
    return c;
  endfunction

endpackage
