// tb_enc_8b10b -- 8b/10b encoder checks:
//  * known symbols: D.0.0 at negative disparity = 100111 0100, K.28.5 =
//    001111 1010 / 110000 0101, D.21.5 = 101010 1010;
//  * every data byte and every valid control byte, encoded at both
//    disparities, decodes back (reference decoder), has disparity 0 or +-2
//    of the right sign, and updates the running disparity accordingly;
//  * a long random stream never has more than five equal bits in a row.
module tb_enc_8b10b;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, ki = 0;
  logic [7:0] din = 0;
  logic [9:0] dout;
  logic rd_pos;

  enc_8b10b dut (.clk, .rst_n, .en, .ki, .din, .dout, .rd_pos);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a..j as written in tables, to the a-at-bit-0 form
  function automatic logic [9:0] sym(logic [9:0] aj);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = aj[9 - i];
    return r;
  endfunction

  task automatic set_rd(bit pos);
    // reset gives negative; K.28.5 at negative disparity flips it to positive
    rst_n = 0; @(negedge clk); rst_n = 1;
    if (pos) begin
      ki = 1; din = 8'hBC; en = 1; @(negedge clk); en = 0;
    end
  endtask

  task automatic expect_sym(bit pos, bit k, logic [7:0] b, logic [9:0] aj, string name);
    set_rd(pos);
    ki = k; din = b; #1;
    checks++;
    if (dout !== sym(aj)) begin failures++; $display("FAIL %s: %b", name, dout); end
  endtask

  initial begin
    int run, ones;
    logic last;
    logic [7:0] db;
    bit dk;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_sym(0, 0, 8'h00, 10'b1001110100, "D.0.0-");
    expect_sym(0, 1, 8'hBC, 10'b0011111010, "K.28.5-");
    expect_sym(1, 1, 8'hBC, 10'b1100000101, "K.28.5+");
    expect_sym(0, 0, 8'hB5, 10'b1010101010, "D.21.5");
    expect_sym(1, 0, 8'h00, 10'b0110001011, "D.0.0+");
    // all codes at both disparities
    for (int pos = 0; pos < 2; pos++)
      for (int k = 0; k < 2; k++)
        for (int v = 0; v < 256; v++) begin
          bit valid_k;
          valid_k = (v[4:0] == 28) || (v[7:5] == 7 && (v[4:0] == 23 || v[4:0] == 27 || v[4:0] == 29 || v[4:0] == 30));
          if (k && !valid_k) continue;
          set_rd(pos);
          ki = k; din = 8'(v); #1;
          ones = $countones(dout);
          checks++;
          if (!dec_8b10b(dout, db, dk) || db != 8'(v) || dk != k) begin
            failures++; $display("FAIL decode v=%h k=%0d pos=%0d code=%b -> %h/%0d", v, k, pos, dout, db, dk);
          end
          checks++;
          if (!(ones == 5 || (ones == 6 && !pos) || (ones == 4 && pos))) begin
            failures++; $display("FAIL disparity v=%h k=%0d pos=%0d ones=%0d", v, k, pos, ones);
          end
          en = 1; @(negedge clk); en = 0;
          checks++;
          if (rd_pos !== ((ones == 5) ? 1'(pos) : (ones == 6))) begin
            failures++; $display("FAIL rd update v=%h", v);
          end
        end
    // run length over a random data stream
    rst_n = 0; @(negedge clk); rst_n = 1;
    run = 0; last = 1'b0;
    en = 1;
    for (int n = 0; n < 3000; n++) begin
      ki = ($urandom_range(0, 9) == 0); din = ki ? 8'hBC : 8'($urandom);
      #1;
      for (int i = 0; i < 10; i++) begin
        if (dout[i] == last) run++; else begin run = 1; last = dout[i]; end
        if (run > 5) begin failures++; $display("FAIL run length at symbol %0d", n); run = 0; end
      end
      @(negedge clk);
    end
    en = 0;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
