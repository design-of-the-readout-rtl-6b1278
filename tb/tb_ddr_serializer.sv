// tb_ddr_serializer -- the DDR serializer end to end. The line is sampled
// in the middle of every clock half (two bits per clock), aligned on the
// first K28.5 comma and decoded with a reference 8b/10b decoder. Checks:
// the decoded data bytes rebuild the offered words in order (byte 0 first),
// idle slots carry K28.5, every symbol is a valid code, back-to-back words
// are taken every 20 clocks (5 clocks per byte), and one bit leaves per
// clock half.
module tb_ddr_serializer;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] din = 0;
  logic [3:0]  ki = 0;
  logic        din_vld = 0, din_rdy, sdout;
  bit          q[$];
  logic [31:0] sent[$];
  bit          capture = 0;
  int          commas = 0;
  bit          back_to_back = 0;

  ddr_serializer dut (.clk, .rst_n, .din, .ki, .din_vld, .din_rdy, .sdout);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (capture) begin #2; q.push_back(sdout); end
  always @(posedge clk) if (capture) begin #2; q.push_back(sdout); end

  int last_take = -1, cyc = 0, gaps_ok = 0, gaps_bad = 0;
  always @(posedge clk) begin
    cyc++;
    if (din_vld && din_rdy) begin
      if (last_take >= 0 && back_to_back) begin
        if (cyc - last_take == 20) gaps_ok++; else gaps_bad++;
      end
      last_take = cyc;
    end
  end

  initial begin
    int start, nwords;
    logic [7:0] b;
    bit k;
    logic [31:0] w;
    int nb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    capture = 1;
    repeat (60) @(negedge clk);          // idle: commas
    // 10 back-to-back words, then 10 with random gaps
    for (int i = 0; i < 20; i++) begin
      back_to_back = (i < 10);
      din = $urandom; din_vld = 1;
      do @(posedge clk); while (!din_rdy);
      sent.push_back(din);
      #1;
      if (i >= 10) begin
        din_vld = 0;
        repeat ($urandom_range(0, 40)) @(posedge clk);
        #1;
      end
    end
    din_vld = 0;
    repeat (100) @(negedge clk);
    capture = 0;
    // decode
    start = find_comma(q);
    checks++;
    if (start < 0) begin failures++; $display("FAIL no comma found"); end
    nwords = 0; nb = 0; w = 0;
    for (int i = start; i + 10 <= q.size(); i += 10) begin
      logic [9:0] s;
      for (int j = 0; j < 10; j++) s[j] = q[i + j];
      checks++;
      if (!dec_8b10b(s, b, k)) begin failures++; $display("FAIL invalid symbol %b at %0d", s, i); continue; end
      if (k) begin
        if (b != 8'hBC) begin failures++; $display("FAIL unexpected control %h", b); end
        commas++;
        continue;
      end
      w[8*nb +: 8] = b;
      nb++;
      if (nb == 4) begin
        checks++;
        if (nwords >= sent.size() || w !== sent[nwords]) begin
          failures++; $display("FAIL word %0d: %h", nwords, w);
        end
        nwords++; nb = 0;
      end
    end
    checks++;
    if (nwords != 20) begin failures++; $display("FAIL %0d words decoded", nwords); end
    checks++;
    if (commas < 10) begin failures++; $display("FAIL only %0d commas", commas); end
    checks++;
    if (gaps_ok != 9 || gaps_bad != 0) begin failures++; $display("FAIL word spacing ok=%0d bad=%0d", gaps_ok, gaps_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
