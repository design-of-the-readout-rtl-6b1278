// tb_section_readout -- one data channel from column chains to the serial
// line, with 2 columns of 96 bits (6 words) per frame. The serial output is
// captured on both clock halves, aligned on a comma and decoded. Checks per
// frame: the data words carry the column bits in order, the word after them
// is the CRC-32 of the data words (start FFFFFFFF), the line returns to
// commas afterwards, and busy falls at the end. Two frames are run to show
// that the CRC restarts.
module tb_section_readout;
  import tb_util_pkg::*;
  localparam int C = 2, B = 96;
  localparam int NW = C * B / 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [C-1:0] rd, col_data;
  logic sdout, busy;
  logic [B-1:0] cols [C];
  bit q[$];
  bit capture = 0;

  section_readout #(.COLS_PER_SEC(C), .BITS_PER_COL(B)) dut (
    .clk, .rst_n, .start, .rd, .col_data, .sdout, .busy);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int c = 0; c < C; c++) col_data[c] = cols[c][B-1];
  always @(posedge clk) for (int c = 0; c < C; c++) if (rd[c]) cols[c] <= {cols[c][B-2:0], 1'b0};
  always @(negedge clk) if (capture) begin #2; q.push_back(sdout); end
  always @(posedge clk) if (capture) begin #2; q.push_back(sdout); end

  initial begin
    logic [31:0] exp_words[$];
    logic [C*B-1:0] bits;
    logic [31:0] crc, w;
    logic [7:0] b;
    bit k;
    int st, nb, nw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int c = 0; c < C; c++) for (int i = 0; i < B; i++) cols[c][i] = $urandom;
      for (int c = 0; c < C; c++) for (int i = 0; i < B; i++) bits[c*B + i] = cols[c][B-1-i];
      exp_words.delete();
      crc = 32'hFFFFFFFF;
      for (int n = 0; n < NW; n++) begin
        exp_words.push_back(bits[n*32 +: 32]);
        crc = crc32_word(crc, bits[n*32 +: 32]);
      end
      exp_words.push_back(crc);
      q.delete();
      capture = 1;
      repeat (30) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      while (busy) @(negedge clk);
      repeat (60) @(negedge clk);
      capture = 0;
      st = find_comma(q);
      nb = 0; nw = 0; w = 0;
      for (int i = (st < 0 ? q.size() : st); i + 10 <= q.size(); i += 10) begin
        logic [9:0] s;
        for (int j = 0; j < 10; j++) s[j] = q[i + j];
        if (!dec_8b10b(s, b, k)) begin failures++; $display("FAIL bad symbol"); continue; end
        if (k) continue;
        w[8*nb +: 8] = b; nb++;
        if (nb == 4) begin
          checks++;
          if (nw > NW || w !== exp_words[nw]) begin failures++; $display("FAIL frame %0d word %0d %h", f, nw, w); end
          nw++; nb = 0;
        end
      end
      checks++;
      if (nw != NW + 1) begin failures++; $display("FAIL frame %0d: %0d words", f, nw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
