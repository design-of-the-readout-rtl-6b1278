// tb_digital_threshold -- energies and thresholds against a model, for the
// default windowed bins and for the integral (WINDOWED = 0) option.
// Windowed: on a hit, counter k must get a one-clock write pulse exactly
// when the energy exceeds threshold k and does not exceed threshold k+1
// (the top counter: exceeds threshold 3). Integral: whenever the energy
// exceeds threshold k. Pulses come one clock after the hit; nothing when
// masked or without a hit. Every energy is swept with thresholds 5/10/15/20,
// then random energies, thresholds, hits and masks.
module tb_digital_threshold;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hit = 0, mask = 0;
  logic [4:0]  energy;
  logic [19:0] thr;
  logic [3:0]  wr, wr_int;

  digital_threshold #(.NTHR(4), .W(5)) dut (.clk, .rst_n, .hit, .energy, .thr, .mask, .wr);
  digital_threshold #(.NTHR(4), .W(5), .WINDOWED(1'b0)) dut_int (.clk, .rst_n, .hit, .energy, .thr, .mask,
                                                                 .wr(wr_int));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] model(int e, logic [19:0] t, bit windowed);
    logic [3:0] a, r;
    for (int k = 0; k < 4; k++) a[k] = e > int'(t[5*k +: 5]);
    for (int k = 0; k < 4; k++) r[k] = a[k] && (!windowed || k == 3 || !a[k+1]);
    return r;
  endfunction

  initial begin
    logic [3:0] exp, exp_int;
    energy = 0; thr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the reference setting: ascending thresholds 5, 10, 15, 20
    thr = {5'd20, 5'd15, 5'd10, 5'd5};
    for (int e = 0; e < 32; e++) begin
      energy = 5'(e); hit = 1; mask = 0;
      @(negedge clk);
      hit = 0;
      exp     = (e > 20) ? 4'b1000 : (e > 15) ? 4'b0100 : (e > 10) ? 4'b0010 : (e > 5) ? 4'b0001 : 4'b0000;
      exp_int = {e > 20, e > 15, e > 10, e > 5};
      checks++;
      if (wr !== exp) begin failures++; $display("FAIL e=%0d wr=%b exp=%b", e, wr, exp); end
      checks++;
      if (wr_int !== exp_int) begin failures++; $display("FAIL integral e=%0d wr=%b exp=%b", e, wr_int, exp_int); end
      @(negedge clk);
      checks++;
      if (wr !== 4'b0 || wr_int !== 4'b0) begin failures++; $display("FAIL pulse longer than a clock"); end
    end
    for (int i = 0; i < 3000; i++) begin
      energy = 5'($urandom); thr = 20'($urandom);
      hit = $urandom_range(0, 1); mask = ($urandom_range(0, 4) == 0);
      exp     = (hit && !mask) ? model(energy, thr, 1) : 4'b0;
      exp_int = (hit && !mask) ? model(energy, thr, 0) : 4'b0;
      @(negedge clk);
      checks++;
      if (wr !== exp || wr_int !== exp_int) begin
        failures++; $display("FAIL random wr=%b/%b exp=%b/%b", wr, wr_int, exp, exp_int);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
