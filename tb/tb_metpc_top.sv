// tb_metpc_top -- end-to-end test of the chip at a reduced size: 4 columns,
// 4 rows, 2 sections of 2 columns. SPI configuration, an exposure with
// single, shared, masked and saturating events, then a readout whose serial
// frames are decoded and checked against a reference model. The test itself
// lives in metpc_top_tb_body.svh, shared with the full-size test.
module tb_metpc_top;
  localparam int C = 4, R = 4, S = 2, N_EV = 80;
`include "metpc_top_tb_body.svh"
  metpc_top #(.COLS(C), .ROWS(R), .SECTIONS(S)) dut (
    .clk, .rst_n, .shutter, .local_tot, .sum_tot, .spi_sclk, .spi_sdi, .spi_ss_n, .spi_sdo,
    .sdout, .readout_busy, .dac_code, .mode, .hit);
endmodule
