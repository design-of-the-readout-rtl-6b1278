// tb_column_readout -- readout sequencer with small columns (3 columns of
// 40 bits) modelled as shift registers in the testbench. Random contents,
// random backpressure. Checks: columns are read in order, each bit once,
// the words hold the bits first-bit-at-bit-0 (the last word is padded with
// zeros), `last` marks only the final word, only one column shifts at a
// time, and without backpressure the frame takes one clock per bit.
module tb_column_readout;
  localparam int C = 3, B = 40;
  localparam int NBITS = C * B;
  localparam int NWORDS = (NBITS + 31) / 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, word_ready = 0;
  logic [C-1:0] rd, col_data;
  logic word_valid, last, busy;
  logic [31:0] word;
  logic [B-1:0] cols [C];
  logic [NBITS-1:0] expect_bits;
  bit random_ready = 1;

  column_readout #(.COLS_PER_SEC(C), .BITS_PER_COL(B)) dut (
    .clk, .rst_n, .start, .rd, .col_data, .word_valid, .word, .word_ready, .last, .busy);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // column chains: MSB leaves first, zeros enter
  always_comb for (int c = 0; c < C; c++) col_data[c] = cols[c][B-1];
  always @(posedge clk) for (int c = 0; c < C; c++) if (rd[c]) cols[c] <= {cols[c][B-2:0], 1'b0};

  int multi_rd = 0;
  always @(posedge clk) if ($countones(rd) > 1) multi_rd++;
  always @(negedge clk) word_ready = random_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1;

  task automatic frame(bit rnd, output int cycles);
    int nw;
    random_ready = rnd;
    for (int c = 0; c < C; c++) begin
      for (int i = 0; i < B; i++) cols[c][i] = $urandom;
      for (int i = 0; i < B; i++) expect_bits[c*B + i] = cols[c][B-1-i];
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1; nw = 0;
    while (nw < NWORDS && cycles < 10000) begin
      @(posedge clk);
      cycles++;
      if (word_valid && word_ready) begin
        logic [31:0] exp;
        exp = '0;
        for (int i = 0; i < 32; i++) if (nw*32 + i < NBITS) exp[i] = expect_bits[nw*32 + i];
        checks++;
        if (word !== exp) begin failures++; $display("FAIL word %0d %h exp %h", nw, word, exp); end
        checks++;
        if (last !== (nw == NWORDS - 1)) begin failures++; $display("FAIL last at word %0d", nw); end
        nw++;
      end
    end
    @(negedge clk);
    checks++;
    if (busy || nw != NWORDS) begin failures++; $display("FAIL frame end: busy=%b words=%0d", busy, nw); end
    for (int c = 0; c < C; c++) begin
      checks++;
      if (cols[c] !== '0) begin failures++; $display("FAIL column %0d not fully shifted", c); end
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(0, cyc);
    checks++;
    if (cyc != NBITS + 2) begin failures++; $display("FAIL frame took %0d clocks, exp %0d", cyc, NBITS + 2); end
    frame(1, cyc);
    frame(1, cyc);
    checks++;
    if (multi_rd != 0) begin failures++; $display("FAIL several columns shifted at once"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
