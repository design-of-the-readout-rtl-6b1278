// Shared body of the chip-level testbenches. The including module declares
// the localparams C (columns), R (rows), S (sections) and N_EV (number of
// random clusters), includes this file, and then instantiates metpc_top as
// "dut" with the signals declared here.
//
// One complete operation of the chip:
//   1. Configuration over SPI (mode 1, MSB first, SCLK = clk/16). Every
//      column gets its R x 30 chain bits as 8-bit words addressed by
//      section and column; each pixel receives a distinct DAC code, random
//      ascending thresholds, a mode bit, and one pixel is masked. An
//      out-of-range address word is sent and must change nothing. The SDO
//      line must echo the previous word.
//   2. Exposure (shutter low): fixed and random photon clusters, each a
//      summing-node ToT with up to four local ToTs around the node. A
//      reference model gives the winning pixel and its energy bins.
//   3. Readout: the shutter rises; every section serialises its columns
//      as 8b10b symbols with a CRC-32 word at the end. The serial lines are
//      captured on both clock edges, decoded, and each frame's CRC and every
//      pixel's four LFSR words are checked. Clusters driven while the
//      shutter is high must produce no hit.
// Each mechanism is counted; one that never happened counts as a failure.

  import tb_util_pkg::*;
  localparam int CPS = C / S;
  localparam int B   = R * 48;                 // bits per column
  localparam int NW  = CPS * B / 32;            // data words per section frame
  localparam int HALF = 80;                     // SCLK half period: 8 clocks

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shutter = 0;
  logic [C*R-1:0] local_tot = '0, sum_tot = '0;
  logic spi_sclk = 0, spi_sdi = 0, spi_ss_n = 1, spi_sdo;
  logic [S-1:0] sdout, readout_busy;
  logic [C*R*8-1:0] dac_code;
  logic [C*R-1:0] mode, hit;

  int thr[C*R][4];
  bit masked[C*R];
  int exp_cnt[C*R][4];
  int n_spi = 0, n_echo = 0, n_addr_err = 0, n_single = 0, n_shared = 0, n_sat = 0;
  int n_masked = 0, n_ignored = 0, n_comma = 0, n_crc = 0, n_counted = 0;
  bit q[S][$];
  bit capture = 0;

  always #5 clk = ~clk;

  initial begin
    #(64'd4000000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < S; s++) begin : g_cap
    always @(negedge clk) if (capture) begin #2; q[s].push_back(sdout[s]); end
    always @(posedge clk) if (capture) begin #2; q[s].push_back(sdout[s]); end
  end

  function automatic int idx(int c, int r); return c * R + r; endfunction

  logic [15:0] last_tx = '0;
  bit have_last = 0;
  task automatic spi_word(logic [15:0] tx);
    logic [15:0] rx;
    spi_ss_n = 0; #(HALF);
    for (int i = 0; i < 16; i++) begin
      spi_sclk = 1; spi_sdi = tx[15 - i];
      #(HALF);
      spi_sclk = 0;
      rx[15 - i] = spi_sdo;
      #(HALF);
    end
    spi_ss_n = 1; #(6 * HALF);
    n_spi++;
    if (have_last) begin
      checks++;
      if (rx !== last_tx) begin failures++; $display("FAIL SDO echo %h exp %h", rx, last_tx); end
      else n_echo++;
    end
    last_tx = tx; have_last = 1;
  endtask

  task automatic configure();
    logic [29:0] w[C*R];
    logic [B/48*30-1:0] chain;
    for (int p = 0; p < C*R; p++) begin
      int t[4];
      t[0] = $urandom_range(2, 8);
      for (int k = 1; k < 4; k++) t[k] = t[k-1] + $urandom_range(1, 7);
      for (int k = 0; k < 4; k++) thr[p][k] = t[k];
      masked[p] = (p == idx(C - 1, R - 1));
      w[p] = {masked[p], p[0], 8'(p * 29 + 3), 5'(t[3]), 5'(t[2]), 5'(t[1]), 5'(t[0])};
    end
    for (int c = 0; c < C; c++) begin
      // chain[i] is the i-th bit shifted into row 0: the far row goes first
      for (int r = 0; r < R; r++) chain[(R - 1 - r) * 30 +: 30] = w[idx(c, r)];
      for (int j = 0; j < R * 30 / 8; j++) begin
        logic [7:0] d;
        for (int b = 0; b < 8; b++) d[7 - b] = chain[8 * j + b];
        spi_word({3'(c / CPS), 4'(c % CPS), 1'b0, d});
      end
    end
    // an address beyond the last section is refused
    // an address beyond the last section is refused; the second such word
    // also brings back the echo of the first
    for (int i = 0; i < 2; i++) begin
      spi_word({3'(S), 4'd0, 1'b0, 8'hFF});
      n_addr_err++;
    end
    repeat (20) @(negedge clk);
    for (int p = 0; p < C*R; p++) begin
      checks++;
      if (dac_code[p*8 +: 8] !== 8'(p * 29 + 3) || mode[p] !== p[0]) begin
        failures++; $display("FAIL configuration of pixel %0d: dac %h", p, dac_code[p*8 +: 8]);
      end
    end
  endtask

  // node (nc,nr) is the corner shared by pixels (nc..nc+1, nr..nr+1)
  task automatic cluster(int nc, int nr, int lw[4], int sw, bit expect_any);
    int pc[4], pr[4], exp_hit[4], got[4], e, nz;
    nz = 0;
    for (int i = 0; i < 4; i++) begin
      pc[i] = nc + i / 2; pr[i] = nr + i % 2; got[i] = 0;
      if (pc[i] >= C || pr[i] >= R) lw[i] = 0;
      if (lw[i] != 0) nz++;
    end
    for (int i = 0; i < 4; i++) begin
      int m = 0;
      for (int j = 0; j < 4; j++) if (j != i && lw[j] > m) m = lw[j];
      exp_hit[i] = expect_any && lw[i] > 0 && lw[i] >= m;
    end
    for (int t = 0; t < sw + 6; t++) begin
      for (int i = 0; i < 4; i++) if (pc[i] < C && pr[i] < R) local_tot[idx(pc[i], pr[i])] = (t < lw[i]);
      sum_tot[idx(nc, nr)] = (t < sw);
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (pc[i] < C && pr[i] < R && hit[idx(pc[i], pr[i])]) got[i]++;
      if (!expect_any && hit != '0) got[0] += 100;
    end
    e = (sw > 31) ? 31 : sw;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] != exp_hit[i]) begin
        failures++; $display("FAIL cluster at (%0d,%0d) pixel %0d: %0d hits, exp %0d", nc, nr, i, got[i], exp_hit[i]);
      end
      if (exp_hit[i] != 0) begin
        int p = idx(pc[i], pr[i]);
        if (masked[p]) n_masked++;
        else for (int k = 0; k < 4; k++) if (e > thr[p][k] && (k == 3 || e <= thr[p][k+1])) begin exp_cnt[p][k]++; n_counted++; end
        if (sw > 31) n_sat++;
        if (nz > 1) n_shared++; else n_single++;
      end
    end
    if (!expect_any && nz > 0) n_ignored++;
  endtask

  task automatic random_cluster(bit expect_any);
    int nc, nr, lw[4], used[32], mx, sw;
    nc = $urandom_range(0, C - 2); nr = $urandom_range(0, R - 2);
    used = '{default: 0}; mx = 0;
    for (int i = 0; i < 4; i++) begin
      lw[i] = 0;
      if ($urandom_range(0, 2) != 0) begin
        int v;
        do v = $urandom_range(1, 31); while (used[v] != 0);
        used[v] = 1; lw[i] = v;
        if (v > mx) mx = v;
      end
    end
    sw = mx + $urandom_range(0, 6);
    if (sw == 0) sw = 3;
    cluster(nc, nr, lw, sw, expect_any);
  endtask

  task automatic check_frames();
      for (int s = 0; s < S; s++) begin
        logic [31:0] crc, w, exp_w;
      logic [7:0] b;
      bit k;
      int st, nb, nw;
      logic [31:0] data[$];
      st = find_comma(q[s]);
      checks++;
      if (st < 0) begin failures++; $display("FAIL section %0d: no comma", s); continue; end
      nb = 0; nw = 0; w = 0; crc = 32'hFFFFFFFF;
      for (int i = st; i + 10 <= q[s].size(); i += 10) begin
        logic [9:0] sym;
        for (int j = 0; j < 10; j++) sym[j] = q[s][i + j];
        if (!dec_8b10b(sym, b, k)) begin failures++; $display("FAIL section %0d: bad symbol", s); break; end
        if (k) begin if (b == 8'hBC) n_comma++; continue; end
        w[8 * nb +: 8] = b; nb++;
        if (nb == 4) begin
          if (nw < NW) begin data.push_back(w); crc = crc32_word(crc, w); end
          else if (nw == NW) begin
            checks++;
            if (w !== crc) begin failures++; $display("FAIL section %0d CRC %h exp %h", s, w, crc); end
            else n_crc++;
          end
          nw++; nb = 0;
        end
      end
      checks++;
      if (nw != NW + 1) begin failures++; $display("FAIL section %0d: %0d words, exp %0d", s, nw, NW + 1); end
      // unpack: the section's bit stream is column after column, LSB of word first
      for (int cc = 0; cc < CPS; cc++)
        for (int r = 0; r < R; r++)
          for (int kk = 3; kk >= 0; kk--) begin
            logic [11:0] v;
            for (int bit_i = 0; bit_i < 12; bit_i++) begin
              int pos = cc * B + r * 48 + (3 - kk) * 12 + bit_i;
              v[11 - bit_i] = (pos / 32 < data.size()) ? data[pos / 32][pos % 32] : 1'b0;
            end
            checks++;
            if (lfsr_count(v) != exp_cnt[idx(s * CPS + cc, r)][kk]) begin
              failures++;
              $display("FAIL pixel (%0d,%0d) bin %0d: %0d exp %0d", s * CPS + cc, r, kk,
                       lfsr_count(v), exp_cnt[idx(s * CPS + cc, r)][kk]);
            end
          end
    end
  endtask

  initial begin
    int lw[4];
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    configure();
    // exposure
    lw = '{20, 0, 0, 0};   cluster(0, 0, lw, 20, 1);        // one pixel
    lw = '{12, 8, 0, 0};   cluster(1, 0, lw, 20, 1);        // two pixels, 60/40
    lw = '{12, 3, 3, 2};   cluster(0, 1, lw, 20, 1);        // four pixels, 60/15/15/10
    lw = '{0, 0, 0, 25};   cluster(C - 2, R - 2, lw, 25, 1); // the masked pixel
    lw = '{35, 0, 0, 0};   cluster(1, 1, lw, 40, 1);        // ToT beyond 31 cycles
    for (int i = 0; i < N_EV; i++) random_cluster(1);
    // readout
    for (int s = 0; s < S; s++) q[s].delete();
    capture = 1;
    repeat (20) @(negedge clk);
    shutter = 1;
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 4; i++) random_cluster(0);        // ignored: shutter is high
    while (readout_busy != '0) @(negedge clk);
    t1 = $time;
    repeat (60) @(negedge clk);
    capture = 0;
    // the columns of a section are shifted one after the other, one bit per
    // clock; the serial line needs 20 clocks per 32-bit word and keeps up
    checks++;
    if ((t1 - t0) / 10 < CPS * B || (t1 - t0) / 10 > CPS * B + 60) begin
      failures++; $display("FAIL readout took %0d clocks", (t1 - t0) / 10);
    end
    $display("readout: %0d clocks for %0d words per section", (t1 - t0) / 10, NW + 1);
    check_frames();
    shutter = 0;
    $display("spi=%0d echo=%0d addr_err=%0d single=%0d shared=%0d saturated=%0d masked=%0d ignored=%0d counted=%0d commas=%0d crc=%0d",
             n_spi, n_echo, n_addr_err, n_single, n_shared, n_sat, n_masked, n_ignored, n_counted, n_comma, n_crc);
    if (n_spi == 0)     begin failures++; $display("FAIL no SPI words"); end
    if (n_echo == 0)    begin failures++; $display("FAIL no SDO echo"); end
    if (n_single == 0)  begin failures++; $display("FAIL no single-pixel event"); end
    if (n_shared == 0)  begin failures++; $display("FAIL no shared event"); end
    if (n_sat == 0)     begin failures++; $display("FAIL no saturated ToT"); end
    if (n_masked == 0)  begin failures++; $display("FAIL no masked hit"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no event during readout"); end
    if (n_counted == 0) begin failures++; $display("FAIL nothing counted"); end
    if (n_comma == 0)   begin failures++; $display("FAIL no comma"); end
    if (n_crc != S)     begin failures++; $display("FAIL CRC words %0d of %0d", n_crc, S); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
