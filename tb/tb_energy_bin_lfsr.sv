// tb_energy_bin_lfsr -- counting and readout modes of the energy-bin LFSR.
//  * default taps (x^12+x^11+x^10+x^4+1): the first values from reset are
//    0, 1, 3, 7, 15, 30, 60, 120, 240, 481, 963, 1926, 3853, and the register
//    returns to 0 after exactly 4095 counts (maximal length);
//  * taps at bits 0, 2, 4, 11: reproduces the counter values printed in the
//    chip's counting-mode simulation: 1, 2, 5, 11, 22, 45, 91, 183, 366,
//    732, 1465, 2931;
//  * write pulses are ignored in readout mode and read pulses in counting
//    mode; in readout mode the register shifts towards Bit11 (22 -> 44 ->
//    88) and data_out presents the stored value MSB first.
module tb_energy_bin_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shutter = 0, wr = 0, rd = 0, din = 0;
  logic dout_a, dout_b;
  logic [11:0] va, vb;

  energy_bin_lfsr #(.W(12))                   dut_a (.clk, .rst_n, .shutter, .wr, .rd, .data_in(din), .data_out(dout_a), .value(va));
  energy_bin_lfsr #(.W(12), .TAPS(12'h815))   dut_b (.clk, .rst_n, .shutter, .wr, .rd, .data_in(din), .data_out(dout_b), .value(vb));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq_a[13] = '{0, 1, 3, 7, 15, 30, 60, 120, 240, 481, 963, 1926, 3853};
  int seq_b[13] = '{0, 1, 2, 5, 11, 22, 45, 91, 183, 366, 732, 1465, 2931};

  task automatic pulse_wr();
    wr = 1; @(negedge clk); wr = 0; @(negedge clk);
  endtask

  initial begin
    logic [11:0] stored;
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 13; i++) begin
      checks += 2;
      if (va !== 12'(seq_a[i])) begin failures++; $display("FAIL a[%0d]=%0d exp %0d", i, va, seq_a[i]); end
      if (vb !== 12'(seq_b[i])) begin failures++; $display("FAIL b[%0d]=%0d exp %0d", i, vb, seq_b[i]); end
      pulse_wr();
    end
    // period of the default polynomial, counted from the current state
    stored = va; period = 0;
    do begin
      wr = 1; @(negedge clk); period++;
    end while (va != stored && period < 5000);
    wr = 0;
    checks++;
    if (period != 4095) begin failures++; $display("FAIL period %0d", period); end
    // read pulses do nothing while counting
    stored = va;
    rd = 1; repeat (3) @(negedge clk); rd = 0;
    checks++;
    if (va !== stored) begin failures++; $display("FAIL rd moved the counter"); end
    // readout mode: write pulses ignored, shift towards Bit11
    rst_n = 0; @(negedge clk); rst_n = 1;
    repeat (5) pulse_wr();          // b = 22
    checks++;
    if (vb !== 12'd22) begin failures++; $display("FAIL b=%0d exp 22", vb); end
    shutter = 1;
    pulse_wr();
    checks++;
    if (vb !== 12'd22) begin failures++; $display("FAIL wr counted in readout"); end
    stored = va;
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dout_a !== stored[11 - i]) begin failures++; $display("FAIL readout bit %0d", i); end
      if (i < 2) begin
        checks++;
        if (vb !== 12'(22 << i)) begin failures++; $display("FAIL shift b=%0d", vb); end
      end
      din = 1'(i & 1);
      rd = 1; @(negedge clk); rd = 0;
    end
    // the shifted-in bits are now in the register, first one at Bit11
    checks++;
    if (va !== 12'b010101010101) begin failures++; $display("FAIL shifted-in value %b", va); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
