// tb_tot_counter -- random enable/clear sequence against a counting model;
// checks saturation at 31 and the 20 counts of a 200 ns ToT at 100 MHz.
module tb_tot_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [4:0] count;
  logic sat;
  int model = 0;

  tot_counter #(.W(5)) dut (.clk, .rst_n, .clr, .en, .count, .sat);

  always #5 clk = ~clk;   // 100 MHz

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (count !== 5'(model) || sat !== (model == 31)) begin
      failures++;
      $display("FAIL %s: count=%0d sat=%b model=%0d", what, count, sat, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a 200 ns sum ToT: 20 rising edges
    @(negedge clk); en = 1;
    repeat (20) @(negedge clk);
    en = 0; model = 20;
    check("200ns");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; model = 0;
    check("clear");
    // saturation: 40 cycles
    en = 1; repeat (40) @(negedge clk); en = 0; model = 31;
    check("saturate");
    @(negedge clk); clr = 1; en = 1; @(negedge clk); clr = 0; en = 0; model = 0;
    check("clear priority");
    // random
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 19) == 0);
      en  = $urandom_range(0, 1);
      @(negedge clk);
      if (clr) model = 0; else if (en && model < 31) model++;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
