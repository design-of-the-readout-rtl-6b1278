// tb_tot_or_gate -- exhaustive check of the 9-input OR-GATE and a
// pulse-width check: the output must last exactly as long as the longest
// of several pulses that start together.
module tb_tot_or_gate;
  int checks = 0, failures = 0;
  logic [8:0] tin;
  logic       tor;

  tot_or_gate #(.N(9)) dut (.tot_in(tin), .tot_or(tor));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths[9];
    int maxw, hi;
    for (int v = 0; v < 512; v++) begin
      logic exp;
      tin = 9'(v);
      exp = 1'b0;
      for (int i = 0; i < 9; i++) if (v & (1 << i)) exp = 1'b1;
      #1;
      checks++;
      if (tor !== exp) begin failures++; $display("FAIL v=%0d tor=%b", v, tor); end
    end
    // widths of a shared event: output width equals the maximum width
    for (int t = 0; t < 20; t++) begin
      maxw = 0;
      for (int i = 0; i < 9; i++) begin
        widths[i] = $urandom_range(0, 30);
        if (widths[i] > maxw) maxw = widths[i];
      end
      hi = 0;
      for (int step = 0; step < 40; step++) begin
        for (int i = 0; i < 9; i++) tin[i] = (step < widths[i]);
        #1;
        if (tor) hi++;
      end
      checks++;
      if (hi != maxw) begin failures++; $display("FAIL width %0d != %0d", hi, maxw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
