// tb_pixel_matrix -- a 4 x 4 matrix: configuration chains, charge-sharing
// arbitration and the column readout chains.
// Each column's 4 x 30 configuration bits are shifted in (the far row first)
// with a distinct DAC code and random thresholds per pixel and one masked
// pixel; the DAC outputs prove where each word landed. Then clusters are
// driven: a summing node fires for the sum ToT while up to four pixels around
// it carry local ToTs, all starting together. A reference model says which
// pixel must win (non-zero local ToT, not shorter than any of its eight
// neighbours') and which of its counters advance. The fixed cases are the
// single-pixel hit, a two-pixel share and a four-pixel share with 12/3/3/2
// cycle local ToTs under a 20-cycle sum. Finally every column is read out
// (row 0 first, bin 3 first, MSB first) and the LFSR words are decoded.
module tb_pixel_matrix;
  import tb_util_pkg::*;
  localparam int C = 4, R = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shutter = 0;
  logic [C*R-1:0] local_tot = 0, sum_tot = 0, mode, hit;
  logic [C-1:0] cfg_sel_n = '1, cfg_in = 0, rd = 0, rd_out;
  logic [C*R*8-1:0] dac_code;
  int thr[C*R][4];
  bit masked[C*R];
  int exp_cnt[C*R][4];
  int n_single = 0, n_shared = 0, n_masked = 0, n_sat = 0;

  pixel_matrix #(.COLS(C), .ROWS(R)) dut (.clk, .rst_n, .shutter, .local_tot, .sum_tot,
    .cfg_sel_n, .cfg_in, .rd, .rd_out, .dac_code, .mode, .hit);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(int c, int r); return c * R + r; endfunction

  task automatic configure();
    logic [29:0] w[C*R];
    for (int p = 0; p < C*R; p++) begin
      int t[4];
      t[0] = $urandom_range(2, 8);
      for (int k = 1; k < 4; k++) t[k] = t[k-1] + $urandom_range(1, 7);
      for (int k = 0; k < 4; k++) thr[p][k] = t[k];
      masked[p] = (p == idx(3, 3));
      w[p] = {masked[p], p[0], 8'(p * 13 + 7), 5'(t[3]), 5'(t[2]), 5'(t[1]), 5'(t[0])};
    end
    cfg_sel_n = '0;
    for (int r = R - 1; r >= 0; r--)
      for (int i = 0; i < 30; i++) begin
        for (int c = 0; c < C; c++) cfg_in[c] = w[idx(c, r)][i];
        @(negedge clk);
      end
    cfg_sel_n = '1;
    @(negedge clk);
    for (int p = 0; p < C*R; p++) begin
      checks++;
      if (dac_code[p*8 +: 8] !== 8'(p * 13 + 7) || mode[p] !== p[0]) begin
        failures++; $display("FAIL config of pixel %0d", p);
      end
    end
  endtask

  // node (nc,nr) is the corner shared by pixels (nc..nc+1, nr..nr+1)
  task automatic cluster(int nc, int nr, int lw[C*R], int sw);
    int exp_hit[C*R], got[C*R], winner, e;
    for (int p = 0; p < C*R; p++) begin exp_hit[p] = 0; got[p] = 0; end
    winner = -1;
    for (int c = nc; c <= nc + 1; c++)
      for (int r = nr; r <= nr + 1; r++) begin
        int m;
        if (c < 0 || r < 0 || c >= C || r >= R) continue;
        m = 0;
        for (int dc = -1; dc <= 1; dc++)
          for (int dr = -1; dr <= 1; dr++)
            if (c+dc >= 0 && c+dc < C && r+dr >= 0 && r+dr < R && (dc != 0 || dr != 0))
              if (lw[idx(c+dc, r+dr)] > m) m = lw[idx(c+dc, r+dr)];
        if (lw[idx(c, r)] > 0 && lw[idx(c, r)] >= m) begin exp_hit[idx(c, r)] = 1; winner = idx(c, r); end
      end
    for (int t = 0; t < sw + 5; t++) begin
      for (int p = 0; p < C*R; p++) local_tot[p] = (t < lw[p]);
      sum_tot = '0;
      sum_tot[idx(nc, nr)] = (t < sw);
      @(negedge clk);
      for (int p = 0; p < C*R; p++) if (hit[p]) got[p]++;
    end
    e = (sw > 31) ? 31 : sw;
    for (int p = 0; p < C*R; p++) begin
      checks++;
      if (got[p] != exp_hit[p]) begin
        failures++; $display("FAIL node (%0d,%0d) pixel %0d hits %0d exp %0d", nc, nr, p, got[p], exp_hit[p]);
      end
      if (exp_hit[p] != 0 && !masked[p])
        for (int k = 0; k < 4; k++) if (e > thr[p][k] && (k == 3 || e <= thr[p][k+1])) exp_cnt[p][k]++;
      if (exp_hit[p] != 0 && masked[p]) n_masked++;
    end
    if (winner >= 0 && sw > 31) n_sat++;
  endtask

  initial begin
    int lw[C*R];
    repeat (2) @(negedge clk);
    rst_n = 1;
    configure();
    // single-pixel event
    lw = '{default: 0}; lw[idx(1, 1)] = 20;
    cluster(1, 1, lw, 20); n_single++;
    // two pixels sharing 60/40
    lw = '{default: 0}; lw[idx(1, 1)] = 12; lw[idx(2, 1)] = 8;
    cluster(1, 1, lw, 20); n_shared++;
    // four pixels sharing 60/15/15/10
    lw = '{default: 0}; lw[idx(1, 1)] = 12; lw[idx(2, 1)] = 3; lw[idx(1, 2)] = 3; lw[idx(2, 2)] = 2;
    cluster(1, 1, lw, 20); n_shared++;
    // winner not at the node's own pixel
    lw = '{default: 0}; lw[idx(2, 2)] = 15; lw[idx(1, 2)] = 4;
    cluster(1, 1, lw, 18); n_shared++;
    // masked pixel wins
    lw = '{default: 0}; lw[idx(3, 3)] = 10;
    cluster(2, 2, lw, 12);
    // saturation
    lw = '{default: 0}; lw[idx(0, 0)] = 35;
    cluster(0, 0, lw, 36);
    // random clusters with distinct local ToTs inside the 2 x 2 block
    for (int i = 0; i < 120; i++) begin
      int nc, nr, sw, mx, used[32];
      nc = $urandom_range(0, C - 2); nr = $urandom_range(0, R - 2);
      lw = '{default: 0}; used = '{default: 0}; mx = 0;
      for (int c = nc; c <= nc + 1; c++)
        for (int r = nr; r <= nr + 1; r++)
          if ($urandom_range(0, 2) != 0) begin
            int v;
            do v = $urandom_range(1, 31); while (used[v] != 0);
            used[v] = 1; lw[idx(c, r)] = v;
            if (v > mx) mx = v;
          end
      sw = mx + $urandom_range(0, 6);
      if (sw == 0) sw = 3;
      cluster(nc, nr, lw, sw);
      if (mx != 0 && (lw[idx(nc,nr)] != 0) + (lw[idx(nc+1,nr)] != 0) + (lw[idx(nc,nr+1)] != 0) + (lw[idx(nc+1,nr+1)] != 0) > 1)
        n_shared++;
    end
    // readout of all columns in parallel
    shutter = 1;
    @(negedge clk);
    for (int r = 0; r < R; r++)
      for (int k = 3; k >= 0; k--) begin
        logic [11:0] v[C];
        for (int i = 11; i >= 0; i--) begin
          for (int c = 0; c < C; c++) v[c][i] = rd_out[c];
          rd = '1; @(negedge clk); rd = '0;
        end
        for (int c = 0; c < C; c++) begin
          checks++;
          if (lfsr_count(v[c]) != exp_cnt[idx(c, r)][k]) begin
            failures++;
            $display("FAIL pixel (%0d,%0d) bin %0d: %0d exp %0d", c, r, k, lfsr_count(v[c]), exp_cnt[idx(c, r)][k]);
          end
        end
      end
    checks++;
    if (n_single == 0 || n_shared == 0 || n_masked == 0 || n_sat == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("single=%0d shared=%0d masked=%0d saturated=%0d", n_single, n_shared, n_masked, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
