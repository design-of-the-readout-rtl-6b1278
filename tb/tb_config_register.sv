// tb_config_register -- three 30-bit registers chained as in a column.
// 90 random bits are shifted in with select_n low; the first bit sent must
// end in bit 0 of the last register of the chain and the last bit sent in
// bit 29 of the first one. With select_n high the contents must hold.
module tb_config_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, select_n = 1, sin = 0;
  logic [2:0] sout;
  logic [29:0] cfg [3];
  logic [89:0] stream;

  config_register #(.CFG_BITS(30)) r0 (.clk, .rst_n, .select_n, .sin(sin),     .sout(sout[0]), .cfg(cfg[0]));
  config_register #(.CFG_BITS(30)) r1 (.clk, .rst_n, .select_n, .sin(sout[0]), .sout(sout[1]), .cfg(cfg[1]));
  config_register #(.CFG_BITS(30)) r2 (.clk, .rst_n, .select_n, .sin(sout[1]), .sout(sout[2]), .cfg(cfg[2]));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 0; i < 90; i++) stream[i] = 1'($urandom);
      // stream[0] is sent first
      select_n = 0;
      for (int i = 0; i < 90; i++) begin
        sin = stream[i];
        @(negedge clk);
      end
      select_n = 1;
      sin = $urandom;
      repeat (5) @(negedge clk);
      // Register 2 (top) holds stream[0..29]: bit j = stream[j]
      for (int p = 0; p < 3; p++)
        for (int j = 0; j < 30; j++) begin
          checks++;
          if (cfg[2-p][j] !== stream[p*30 + j]) begin
            failures++;
            $display("FAIL rep %0d reg %0d bit %0d", rep, 2 - p, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
