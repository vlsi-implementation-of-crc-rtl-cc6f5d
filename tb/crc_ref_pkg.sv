// crc_ref_pkg - reference models used by the testbenches.
//
// Written independently of the RTL's augmented-form formulation:
//   crc32_bytes  the common reflected bit-serial CRC-32 (start FFFFFFFF,
//                reversed polynomial EDB88320, final inversion), i.e. the
//                value zlib and Ethernet software compute
//   ref_step     one byte step of the augmented form by long division of the
//                40-bit polynomial R*x^8 + D by G, highest coefficient first
//   rev32        bit reversal
package crc_ref_pkg;

  localparam logic [32:0] G = 33'h1_04C1_1DB7;

  function automatic logic [31:0] rev32(input logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 32; i++) y[i] = x[31-i];
    return y;
  endfunction

  // Running reflected CRC over one byte (no final inversion).
  function automatic logic [31:0] crc32_byte(input logic [31:0] c,
                                             input logic [7:0]  b);
    logic [31:0] s;
    s = c ^ {24'h0, b};
    for (int k = 0; k < 8; k++)
      s = s[0] ? ((s >> 1) ^ 32'hEDB8_8320) : (s >> 1);
    return s;
  endfunction

  // R' = (R * x^8 + D) mod G; data bit k is the coefficient of x^(7-k).
  function automatic logic [31:0] ref_step(input logic [31:0] r,
                                           input logic [7:0]  d);
    logic [39:0] p;
    p = {r, 8'h00};
    for (int k = 0; k < 8; k++) p[7-k] = d[k];
    for (int n = 39; n >= 32; n--)
      if (p[n]) p[n -: 33] = p[n -: 33] ^ G;
    return p[31:0];
  endfunction

  // Number of state/data bits that next-state bit i depends on.
  function automatic int unsigned fan_in(input int unsigned i);
    int unsigned n;
    logic [31:0] e;
    n = 0;
    for (int j = 0; j < 32; j++) begin
      e = ref_step(32'h1 << j, 8'h00);
      n += int'(e[i]);
    end
    for (int j = 0; j < 8; j++) begin
      e = ref_step(32'h0, 8'h1 << j);
      n += int'(e[i]);
    end
    return n;
  endfunction

endpackage
