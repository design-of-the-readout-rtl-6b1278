// tb_spi_slave -- SPI master model (CPOL 0, CPHA 1, MSB first, SCLK =
// system clock / 16) sending random 16-bit words. Checks: each word appears
// on `word` with a single word_valid pulse, and during each transfer SDO,
// sampled by the master on the falling SCLK edge, carries the previous
// word; SDO stays low while SS_n is high; a transfer aborted after 7 bits
// delivers nothing.
module tb_spi_slave;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, sdi = 0, ss_n = 1;
  logic sdo, word_valid;
  logic [15:0] word;
  int valids = 0;
  logic [15:0] got;

  spi_slave #(.WORD_W(16)) dut (.clk, .rst_n, .sclk, .sdi, .ss_n, .sdo, .word_valid, .word);

  always #5 clk = ~clk;          // system clock, 10 ns
  localparam int HALF = 80;      // SCLK half period: 16 system clocks per SCLK

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (word_valid) begin valids++; got = word; end

  task automatic xfer(logic [15:0] tx, int nbits, output logic [15:0] rx);
    rx = '0;
    ss_n = 0; #(HALF);
    for (int i = 0; i < nbits; i++) begin
      sclk = 1; sdi = tx[15 - i];       // CPHA 1: launch on rising edge
      #(HALF);
      sclk = 0;                         // sample on falling edge
      rx[15 - i] = sdo;
      #(HALF);
    end
    ss_n = 1; #(4 * HALF);
  endtask

  initial begin
    logic [15:0] prev, tx, rx;
    int v0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #(HALF);
    checks++;
    if (sdo !== 1'b0) begin failures++; $display("FAIL sdo not low when idle"); end
    prev = 16'h0000;
    for (int n = 0; n < 40; n++) begin
      tx = $urandom;
      v0 = valids;
      xfer(tx, 16, rx);
      checks++;
      if (valids != v0 + 1 || got !== tx) begin failures++; $display("FAIL word %0d: got %h exp %h (%0d strobes)", n, got, tx, valids - v0); end
      checks++;
      if (rx !== prev) begin failures++; $display("FAIL echo %0d: %h exp %h", n, rx, prev); end
      checks++;
      if (sdo !== 1'b0) begin failures++; $display("FAIL sdo not low after transfer"); end
      prev = tx;
    end
    v0 = valids;
    xfer(16'hFFFF, 7, rx);
    checks++;
    if (valids != v0) begin failures++; $display("FAIL aborted transfer produced a word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
