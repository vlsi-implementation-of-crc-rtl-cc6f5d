// crc32_pkg - constants and GF(2) helper functions shared by the CRC-32
// generator.
//
// The generator works on the "augmented" form of the CRC: every clock the
// 32-bit register R(x) is multiplied by x^8, the incoming byte D(x) is added
// in the low eight coefficients and the sum is reduced modulo the Ethernet
// generator polynomial G(x) = 04C11DB7 (x^32 implied):
//
//     R' = (R * x^8 + D) mod G
//
// Starting from the preset 46AF6449 and feeding four zero bytes after the
// frame leaves the same remainder as the usual all-ones start, so inverting
// the register then gives the Ethernet FCS. Preset, polynomial and the
// four-zero-byte tail follow the design; the bit order below is this design's
// choice, matching Ethernet's wire order.
//
// Bit order: R[31] is the coefficient of x^31. Data bit 0 is the first bit on
// the wire and is shifted in first, so it lands on the coefficient x^7 of the
// byte. The FCS is sent starting with bit 31. Reversing the 32 bits of the
// inverted register gives the usual CRC-32 check value (CBF43926 for the
// ASCII string "123456789").
package crc32_pkg;

  localparam int unsigned CRC_W  = 32;
  localparam int unsigned DATA_W = 8;
  // Number of register and data bits that can feed one next-state bit.
  localparam int unsigned NIN    = CRC_W + DATA_W;

  localparam logic [CRC_W-1:0] CRC_POLY = 32'h04C1_1DB7;
  // Preset for the augmented form, equivalent to FFFFFFFF in the direct form.
  localparam logic [CRC_W-1:0] CRC_INIT = 32'h46AF_6449;

  // One byte step of the augmented CRC, written as eight single-bit shifts.
  // Used as a constant function to derive the XOR network; in logic it
  // flattens to at most eight inputs per output bit.
  function automatic logic [CRC_W-1:0] crc_step(input logic [CRC_W-1:0] r,
                                                input logic [DATA_W-1:0] d);
    logic [CRC_W-1:0] s;
    logic             top;
    s = r;
    for (int k = 0; k < DATA_W; k++) begin
      top = s[CRC_W-1];
      s   = {s[CRC_W-2:0], d[k]};
      if (top) s = s ^ CRC_POLY;
    end
    return s;
  endfunction

  // Input set of next-state bit i as a mask over v = {d, r}: bits 31:0 are
  // register bits, bits 39:32 data bits.
  function automatic logic [NIN-1:0] input_mask(input logic [4:0] i);
    logic [NIN-1:0] m;
    logic [CRC_W-1:0] e;
    m = '0;
    for (int j = 0; j < CRC_W; j++) begin
      e = crc_step(CRC_W'(1) << j, '0);
      m[j] = e[i];
    end
    for (int j = 0; j < DATA_W; j++) begin
      e = crc_step('0, DATA_W'(1) << j);
      m[CRC_W+j] = e[i];
    end
    return m;
  endfunction

  function automatic int unsigned popcount(input logic [NIN-1:0] m);
    int unsigned n;
    n = 0;
    for (int j = 0; j < NIN; j++) n += int'(m[j]);
    return n;
  endfunction

  // Quarter q (0..3) of the input set of bit i: the set bits are taken in
  // index order and dealt two at a time, so inputs 0,1 form quarter 0,
  // inputs 2,3 quarter 1 and so on. With eight inputs at most this gives the
  // pairs of the first level of a balanced tree of 2-input XOR gates.
  function automatic logic [NIN-1:0] quarter_mask(input logic [4:0] i,
                                                  input int unsigned q);
    logic [NIN-1:0] m, qm;
    int unsigned    n;
    m  = input_mask(i);
    qm = '0;
    n  = 0;
    for (int j = 0; j < NIN; j++) begin
      if (m[j]) begin
        if (n / 2 == q) qm[j] = 1'b1;
        n++;
      end
    end
    return qm;
  endfunction

endpackage
