// crc_cl_tb - checks the next-state logic against a long-division reference
// for random register/data values, that no output bit has more than eight
// inputs (three XOR levels), and that critical bits take the high register
// byte from the critical copy.
module crc_cl_tb;
  import crc_ref_pkg::*;
  logic [31:0] crc, crit, nxt, exp_a, exp_b, exp;
  logic [7:0]  d;
  int checks = 0, failures = 0;
  int unsigned fin [32];
  int unsigned maxfin;

  crc_cl #(.CRIT_MIN_IN(5)) dut (.crc_i(crc), .crit_i(crit), .d_i(d), .next_o(nxt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    maxfin = 0;
    for (int i = 0; i < 32; i++) begin
      fin[i] = fan_in(i);
      if (fin[i] > maxfin) maxfin = fin[i];
    end
    checks++;
    if (maxfin != 8) begin failures++; $display("FAIL max fan-in %0d", maxfin); end

    // Known points: zero stays zero; preset with zero byte.
    crc = 32'h0; crit = crc; d = 8'h0; #1;
    checks++; if (nxt !== 32'h0) begin failures++; $display("FAIL zero"); end
    crc = 32'h0; crit = crc; d = 8'h01; #1;   // bit 0 is x^7
    checks++; if (nxt !== 32'h0000_0080) begin failures++; $display("FAIL d0 %h", nxt); end
    crc = 32'h8000_0000; crit = crc; d = 8'h00; #1; // x^39 mod G
    checks++; if (nxt !== ref_step(32'h8000_0000, 8'h00)) begin failures++; $display("FAIL x39"); end

    for (int n = 0; n < 2000; n++) begin
      crc  = $urandom;
      d    = 8'($urandom);
      crit = (n % 2 == 0) ? crc : $urandom;
      #1;
      exp_a = ref_step(crc, d);
      exp_b = ref_step(crit, d);
      for (int i = 0; i < 32; i++) exp[i] = (fin[i] >= 5) ? exp_b[i] : exp_a[i];
      // Critical copy only differs from the real register in what it drives:
      // low register bits of crit must not matter, since only 31:24 are
      // shared between trees; use crit's high byte and crc's low bits.
      if (n % 2 == 1) begin
        crit[23:0] = crc[23:0];
        #1;
        exp_b = ref_step(crit, d);
        for (int i = 0; i < 32; i++) exp[i] = (fin[i] >= 5) ? exp_b[i] : exp_a[i];
      end
      checks++;
      if (nxt !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL crc=%h crit=%h d=%h got=%h exp=%h", crc, crit, d, nxt, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
