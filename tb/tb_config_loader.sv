// tb_config_loader -- SPI words into column configuration chains, with 2
// sections of 3 columns and a testbench model of each column's chain. 30
// random words per column; checks that every column's chain holds exactly
// the bytes addressed to it (MSB first, one bit per select-low clock), that
// only one column is selected at a time for 8 clocks per word, and that a
// word for a non-existent section is dropped with addr_err.
module tb_config_loader;
  localparam int S = 2, CPS = 3, N = S * CPS;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, word_valid = 0;
  logic [15:0] word = 0;
  logic [N-1:0] cfg_sel_n;
  logic cfg_data, busy, addr_err;
  logic [239:0] chain [N];
  logic [239:0] model [N];
  int sel_clocks = 0, errs = 0, multi = 0;

  config_loader #(.SECTIONS(S), .COLS_PER_SEC(CPS)) dut (
    .clk, .rst_n, .word_valid, .word, .cfg_sel_n, .cfg_data, .busy, .addr_err);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int c = 0; c < N; c++) if (!cfg_sel_n[c]) chain[c] <= {cfg_data, chain[c][239:1]};
    if ($countones(~cfg_sel_n) > 1) multi++;
    if (rst_n && cfg_sel_n != '1) sel_clocks++;
    if (addr_err) errs++;
  end

  task automatic send(logic [2:0] sec, logic [3:0] col, logic [7:0] data);
    @(negedge clk);
    word = {sec, col, 1'b0, data}; word_valid = 1;
    @(negedge clk);
    word_valid = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    int c0;
    for (int c = 0; c < N; c++) begin chain[c] = '0; model[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++)
      for (int c = 0; c < N; c++) begin
        logic [7:0] d;
        d = $urandom;
        send(3'(c / CPS), 4'(c % CPS), d);
        for (int i = 7; i >= 0; i--) model[c] = {d[i], model[c][239:1]};
      end
    c0 = sel_clocks;
    send(3'd7, 4'd0, 8'hFF);        // no such section
    send(3'd0, 4'd9, 8'hFF);        // no such column
    for (int c = 0; c < N; c++) begin
      checks++;
      if (chain[c] !== model[c]) begin failures++; $display("FAIL column %0d chain", c); end
    end
    checks++;
    if (c0 != 30 * N * 8) begin failures++; $display("FAIL select-low clocks %0d", c0); end
    checks++;
    if (sel_clocks != c0 || errs != 2) begin failures++; $display("FAIL bad address handling: errs=%0d", errs); end
    checks++;
    if (multi != 0) begin failures++; $display("FAIL several columns selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
