// tb_crc32_gen -- the CRC-32 generator against the word sequence of the
// chip's CRC simulation (87654321 held for two words, then 01010202,
// 01020405, DF8A8A2B, 87654321 give 99AB297E, 55FDAD92, D502F50F,
// F2BFC205, FC1D77B6, 458E2B0C) and against a bit-serial model for random
// words with idle gaps and restarts.
module tb_crc32_gen;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, din_vld = 0;
  logic [31:0] din = 0, dout;
  logic dout_vld;

  crc32_gen dut (.clk, .rst_n, .init, .din_vld, .din, .dout, .dout_vld);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_in [6]  = '{32'h87654321, 32'h87654321, 32'h01010202, 32'h01020405, 32'hdf8a8a2b, 32'h87654321};
  logic [31:0] ref_out [6] = '{32'h99ab297e, 32'h55fdad92, 32'hd502f50f, 32'hf2bfc205, 32'hfc1d77b6, 32'h458e2b0c};

  initial begin
    logic [31:0] model;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      din = ref_in[i]; din_vld = 1;
      @(negedge clk);
      checks++;
      if (dout !== ref_out[i] || !dout_vld) begin
        failures++; $display("FAIL reference word %0d: %h exp %h", i, dout, ref_out[i]);
      end
    end
    din_vld = 0;
    // random stream with gaps and restarts
    init = 1; @(negedge clk); init = 0;
    model = 32'hFFFFFFFF;
    for (int i = 0; i < 500; i++) begin
      din_vld = $urandom_range(0, 1);
      din = $urandom;
      init = ($urandom_range(0, 49) == 0);
      @(negedge clk);
      if (init) model = 32'hFFFFFFFF;
      else if (din_vld) model = crc32_word(model, din);
      checks++;
      if (dout !== model) begin failures++; $display("FAIL random %0d: %h exp %h", i, dout, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
