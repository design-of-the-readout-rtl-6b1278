// tb_metpc_full -- the end-to-end test of metpc_top at its default size:
// 112 x 8 pixels in 7 sections of 16 columns. One complete operation:
// configuration of all 26,880 chain bits over SPI, an exposure with fixed
// and random photon clusters, and the readout of all seven serial links
// with 8b10b decoding, CRC checks and a check of every pixel's four counts.
// The test itself lives in metpc_top_tb_body.svh.
module tb_metpc_full;
  localparam int C = 112, R = 8, S = 7, N_EV = 300;
`include "metpc_top_tb_body.svh"
  metpc_top dut (
    .clk, .rst_n, .shutter, .local_tot, .sum_tot, .spi_sclk, .spi_sdi, .spi_ss_n, .spi_sdo,
    .sdout, .readout_busy, .dac_code, .mode, .hit);
endmodule
