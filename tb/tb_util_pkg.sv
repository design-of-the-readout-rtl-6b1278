// tb_util_pkg -- reference models shared by the METPC testbenches:
// the energy-bin LFSR step and its decoding back to a count, CRC-32 over
// 32-bit words, and an 8b/10b symbol decoder plus a bit-stream aligner for
// checking the serial outputs.
package tb_util_pkg;

  // One counting step of the 12-bit energy-bin LFSR,
  // x^12 + x^11 + x^10 + x^4 + 1 with XNOR feedback into bit 0.
  function automatic logic [11:0] lfsr_next(logic [11:0] v);
    return {v[10:0], ~(v[11] ^ v[10] ^ v[9] ^ v[3])};
  endfunction

  // Number of counts that lead from 0 to v (-1 if v is never reached).
  function automatic int lfsr_count(logic [11:0] v);
    logic [11:0] s = '0;
    for (int n = 0; n < 4096; n++) begin
      if (s == v) return n;
      s = lfsr_next(s);
    end
    return -1;
  endfunction

  function automatic logic [11:0] lfsr_value(int n);
    logic [11:0] s = '0;
    for (int i = 0; i < n; i++) s = lfsr_next(s);
    return s;
  endfunction

  // CRC-32, polynomial 04C11DB7, word fed MSB first, no reflection.
  function automatic logic [31:0] crc32_word(logic [31:0] c, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic top;
      top = c[31] ^ w[i];
      c = c << 1;
      if (top) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  // 8b/10b decoding. Code strings are written a..i / f..j, left first.
  localparam logic [5:0] D6 [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
  localparam logic [3:0] D4 [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  localparam logic [3:0] K4 [8] = '{4'b1011, 4'b0110, 4'b1010, 4'b1100, 4'b1101, 4'b0101, 4'b1001, 4'b0111};

  // sym: bit 0 = a (first on the line) ... bit 9 = j.
  function automatic bit dec_8b10b(logic [9:0] sym, output logic [7:0] b, output bit k);
    logic [5:0] s6;
    logic [3:0] s4;
    int x, y;
    bit ok6, ok4;
    s6 = {sym[0], sym[1], sym[2], sym[3], sym[4], sym[5]};
    s4 = {sym[6], sym[7], sym[8], sym[9]};
    x = -1; y = -1; k = 0;
    if (s6 == 6'b001111 || s6 == 6'b110000) begin
      x = 28; k = 1;
      // K.28.y: the 4b part follows the disparity left by the 6b part
      for (int j = 0; j < 8; j++)
        if ((s6 == 6'b110000 && s4 == K4[j]) || (s6 == 6'b001111 && s4 == ~K4[j])) y = j;
    end else begin
      for (int i = 0; i < 32; i++)
        if (s6 == D6[i] || (($countones(D6[i]) != 3 || i == 7) && s6 == ~D6[i])) x = i;
      for (int j = 0; j < 8; j++)
        if (s4 == D4[j] || (($countones(D4[j]) != 2 || j == 3) && s4 == ~D4[j])) y = j;
      if (s4 == 4'b0111 || s4 == 4'b1000) begin
        y = 7;
        if (x == 23 || x == 27 || x == 29 || x == 30) k = 1;   // K.x.7
      end
    end
    ok6 = (x >= 0); ok4 = (y >= 0);
    b = {3'(y), 5'(x)};
    return ok6 && ok4;
  endfunction

  // Index of the first K28.5 symbol in a bit stream (bit a first), or -1.
  function automatic int find_comma(const ref bit q[$]);
    for (int i = 0; i + 10 <= q.size(); i++) begin
      logic [9:0] s;
      for (int j = 0; j < 10; j++) s[j] = q[i + j];
      if (s == 10'b0101111100 || s == 10'b1010000011) return i;
    end
    return -1;
  endfunction

endpackage
