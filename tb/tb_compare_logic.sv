// tb_compare_logic -- arbitration of one pixel for the cases of the chip's
// charge-sharing simulations (ToTs in 10 ns clock cycles):
//   isolated hit:     local 20, sum 20, neighbours 0          -> hit
//   two pixels share: local 12 vs neighbour 8, sum 20          -> hit
//                     the neighbour's view: local 8 vs 12      -> no hit
//   four pixels:      local 12 vs 3, 3, 1.5 (2), sum 20        -> hit
//                     a 3-cycle pixel of the same event        -> no hit
// plus random events. Checks the hit value, that hit comes exactly one
// clock after the sum ToT has been seen low, that it lasts one clock, the
// number of counter-enable cycles (= sum ToT length) and the counter clear.
module tb_compare_logic;
  import metpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 1;
  logic sum_or = 0, local_tot = 0, local_or = 0;
  logic cnt_en, cnt_clr, hit;
  cmp_state_e state;

  compare_logic dut (.clk, .rst_n, .enable, .sum_or, .local_tot, .local_or,
                     .cnt_en, .cnt_clr, .hit, .state);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int en_cycles;
  always @(posedge clk) if (cnt_en) en_cycles++;

  task automatic event_run(int lw, int ow, int sw, string name);
    int maxw;
    logic exp_hit;
    bit seen_clr;
    maxw = (lw > ow) ? lw : ow;
    exp_hit = enable && (lw > 0) && (lw >= ow);
    en_cycles = 0;
    for (int t = 0; t < sw; t++) begin
      @(negedge clk);
      local_tot = (t < lw);
      local_or  = (t < maxw);
      sum_or    = 1'b1;
    end
    @(negedge clk);
    sum_or = 0; local_tot = 0; local_or = 0;
    @(negedge clk);            // one rising edge saw sum_or low
    checks++;
    if (hit !== exp_hit) begin failures++; $display("FAIL %s: hit=%b exp=%b", name, hit, exp_hit); end
    checks++;
    if (en_cycles != (enable ? sw : 0)) begin failures++; $display("FAIL %s: en_cycles=%0d sw=%0d", name, en_cycles, sw); end
    @(negedge clk);
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL %s: hit longer than one clock", name); end
    seen_clr = cnt_clr;
    @(negedge clk);
    checks++;
    if (enable && !seen_clr) begin failures++; $display("FAIL %s: no counter clear", name); end
    if (state != CMP_IDLE) begin failures++; $display("FAIL %s: not back in IDLE", name); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    event_run(20, 0, 20, "isolated");
    event_run(12, 8, 20, "share2 winner");
    event_run(8, 12, 20, "share2 loser");
    event_run(12, 3, 20, "share4 winner");
    event_run(3, 12, 20, "share4 loser");
    event_run(0, 12, 20, "not involved");
    for (int i = 0; i < 300; i++) begin
      int lw, ow, sw;
      lw = $urandom_range(0, 31);
      ow = $urandom_range(0, 31);
      sw = ((lw > ow) ? lw : ow) + $urandom_range(1, 6);
      event_run(lw, ow, sw, "random");
    end
    // counting disabled (readout mode): no hit, no counting
    enable = 0;
    event_run(20, 0, 20, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
