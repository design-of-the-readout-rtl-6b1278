// tb_workload_rate -- one pixel at the specified counting rate for one
// whole frame. The rate of 3e8 photons/mm^2/s over a 110 um pixel is
// 3.63e6 photons per second; at 1000 frames per second a 1 ms frame holds
// about 3,630 photons. This test drives 3,630 photons into one pixel, one
// every 27 clocks of 10 ns (270 ns apart, 0.98 ms in all), each a 7.2 keV
// photon with a 200 ns (20-clock) sum ToT shared 60/40 with a neighbour.
// Thresholds 5/10/15/25 put every photon into bin 2. Checks: every
// photon produces exactly one hit (the pixel's dead time of sum ToT plus
// three clocks is shorter than the spacing), the frame fits in 1 ms, and
// after the shutter the 12-bit LFSR of bin 2 decodes to 3,630 while the
// other bins read 0, so the counting depth holds a full frame.
module tb_workload_rate;
  import tb_util_pkg::*;
  localparam int N_PHOTONS = 3630, SPACING = 27, SUM_TOT = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shutter = 0;
  logic [8:0] local_tot = 0;
  logic [3:0] sum_tot = 0;
  logic cfg_sel_n = 1, cfg_in = 0, cfg_out, rd = 0, rd_in = 0, rd_out, mode, hit;
  logic [7:0] dac_code;
  logic [4:0] energy;
  logic [47:0] bin_values;
  int hits = 0;

  pixel_digital dut (.clk, .rst_n, .shutter, .local_tot, .sum_tot, .cfg_sel_n, .cfg_in, .cfg_out,
                     .rd, .rd_in, .rd_out, .dac_code, .mode, .hit, .energy, .bin_values);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && hit) hits++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [29:0] v;
    longint t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    v = {1'b0, 1'b0, 8'h80, 5'd25, 5'd15, 5'd10, 5'd5};
    cfg_sel_n = 0;
    for (int i = 0; i < 30; i++) begin cfg_in = v[i]; @(negedge clk); end
    cfg_sel_n = 1;
    @(negedge clk);
    t0 = $time;
    for (int n = 0; n < N_PHOTONS; n++) begin
      for (int t = 0; t < SPACING; t++) begin
        local_tot[0] = (t < 12);
        local_tot[5] = (t < 8);
        sum_tot[n % 4] = (t < SUM_TOT);
        @(negedge clk);
      end
      sum_tot = 0;
    end
    t1 = $time;
    repeat (5) @(negedge clk);
    checks++;
    if (hits != N_PHOTONS) begin failures++; $display("FAIL %0d hits for %0d photons", hits, N_PHOTONS); end
    checks++;
    if (t1 - t0 > 64'd1000000) begin failures++; $display("FAIL frame took %0d ns", t1 - t0); end
    shutter = 1;
    @(negedge clk);
    for (int k = 3; k >= 0; k--) begin
      logic [11:0] w;
      int exp;
      for (int i = 11; i >= 0; i--) begin
        w[i] = rd_out;
        rd = 1; @(negedge clk); rd = 0;
      end
      exp = (k == 2) ? N_PHOTONS : 0;
      checks++;
      if (lfsr_count(w) != exp) begin failures++; $display("FAIL bin %0d: %0d exp %0d", k, lfsr_count(w), exp); end
    end
    $display("%0d photons in %0d ns, %0d hits", N_PHOTONS, t1 - t0, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
