// tb_pixel_digital -- one pixel: configuration through its 30-bit chain,
// events with and without charge sharing, counting, masking and readout.
// Thresholds 5, 10, 15, 20 (ToT clock cycles). Each event has a sum ToT on
// one of the four summing-node inputs, a local ToT and a competing ToT on
// one of the eight neighbour inputs. Expected: a hit when the local ToT is
// non-zero and not shorter than the neighbour's; then the energy equals the
// sum ToT length (saturating at 31) and counter k advances when the energy
// lies above threshold k and not above threshold k+1 (counter 3: above
// threshold 3). After the events the 48 readout bits are shifted out
// (bin 3 first, MSB first), decoded with the LFSR model and compared with
// the expected counts; the counters must then read 0.
module tb_pixel_digital;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shutter = 0;
  logic [8:0] local_tot = 0;
  logic [3:0] sum_tot = 0;
  logic cfg_sel_n = 1, cfg_in = 0, cfg_out, rd = 0, rd_in = 0, rd_out, mode, hit;
  logic [7:0] dac_code;
  logic [4:0] energy;
  logic [47:0] bin_values;
  int exp_cnt[4];
  int hits = 0, shared = 0, sat_events = 0;
  int thr[4] = '{5, 10, 15, 20};

  pixel_digital dut (.clk, .rst_n, .shutter, .local_tot, .sum_tot, .cfg_sel_n, .cfg_in, .cfg_out,
                     .rd, .rd_in, .rd_out, .dac_code, .mode, .hit, .energy, .bin_values);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(bit mask);
    logic [29:0] v;
    v = {mask, 1'b1, 8'hA5, 5'(thr[3]), 5'(thr[2]), 5'(thr[1]), 5'(thr[0])};
    cfg_sel_n = 0;
    for (int i = 0; i < 30; i++) begin cfg_in = v[i]; @(negedge clk); end
    cfg_sel_n = 1;
    @(negedge clk);
  endtask

  task automatic run_event(int lw, int nw, int sw, bit masked);
    int e, seen_hit, seen_e;
    int nb, sb;
    nb = $urandom_range(1, 8); sb = $urandom_range(0, 3);
    seen_hit = 0; seen_e = -1;
    for (int t = 0; t < sw; t++) begin
      local_tot[0]  = (t < lw);
      local_tot[nb] = (t < nw);
      sum_tot[sb]   = 1'b1;
      @(negedge clk);
      if (hit) seen_hit++;
    end
    local_tot = 0; sum_tot = 0;
    repeat (5) begin
      @(negedge clk);
      if (hit) begin seen_hit++; seen_e = energy; end
    end
    e = (sw > 31) ? 31 : sw;
    checks++;
    if (seen_hit != ((lw > 0 && lw >= nw) ? 1 : 0)) begin
      failures++; $display("FAIL hit count %0d for lw=%0d nw=%0d", seen_hit, lw, nw);
    end
    if (seen_hit == 1) begin
      hits++;
      if (nw > 0) shared++;
      if (sw > 31) sat_events++;
      checks++;
      if (seen_e != e) begin failures++; $display("FAIL energy %0d exp %0d", seen_e, e); end
      if (!masked) for (int k = 0; k < 4; k++) if (e > thr[k] && (k == 3 || e <= thr[k+1])) exp_cnt[k]++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    configure(0);
    checks++;
    if (dac_code !== 8'hA5 || mode !== 1'b1) begin failures++; $display("FAIL config outputs"); end
    // the three charge-sharing cases of the chip simulations (sum 200 ns)
    run_event(20, 0, 20, 0);
    run_event(12, 8, 20, 0);
    run_event(8, 12, 20, 0);
    run_event(12, 3, 20, 0);
    run_event(2, 12, 20, 0);
    run_event(20, 0, 40, 0);     // longer than 320 ns: saturates
    for (int i = 0; i < 150; i++) begin
      int lw, nw, sw;
      lw = $urandom_range(0, 30); nw = ($urandom_range(0, 1) != 0) ? $urandom_range(0, 30) : 0;
      sw = ((lw > nw) ? lw : nw) + $urandom_range(0, 8);
      if (sw == 0) sw = 1;
      run_event(lw, nw, sw, 0);
    end
    // masked pixel: hits still decided, nothing counted
    configure(1);
    for (int i = 0; i < 10; i++) run_event(25, 0, 25, 1);
    // readout
    shutter = 1;
    @(negedge clk);
    for (int k = 3; k >= 0; k--) begin
      logic [11:0] v;
      for (int i = 11; i >= 0; i--) begin
        v[i] = rd_out;
        rd = 1; @(negedge clk); rd = 0;
      end
      checks++;
      if (lfsr_count(v) != exp_cnt[k]) begin
        failures++; $display("FAIL bin %0d: %0d counts, exp %0d", k, lfsr_count(v), exp_cnt[k]);
      end
    end
    checks++;
    if (bin_values !== '0) begin failures++; $display("FAIL counters not cleared by readout"); end
    checks++;
    if (hits == 0 || shared == 0 || sat_events == 0) begin failures++; $display("FAIL mechanisms not exercised"); end
    $display("hits=%0d shared=%0d saturated=%0d counts=%0d/%0d/%0d/%0d", hits, shared, sat_events,
             exp_cnt[0], exp_cnt[1], exp_cnt[2], exp_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
