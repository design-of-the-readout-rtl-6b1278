// metpc_top -- digital core of the METPC photon-counting readout chip.
//
// A COLS x ROWS matrix of pixels (112 x 8) counts X-ray photons in four
// energy ranges per pixel while `shutter` is low. The analog front ends
// (not part of this RTL) deliver per pixel a local ToT pulse and the sum
// ToT pulse of the summing node at the pixel's corner; each pixel decides
// from the local ToTs of its 3x3 neighbourhood whether it collected the
// largest share of a photon's charge, digitises the event energy as the
// length of the sum ToT and counts it in the 12-bit LFSR counter of the
// energy bin (between two of the four thresholds) it falls into.
// On the rising edge of `shutter` the readout starts: the columns are
// grouped into SECTIONS sections of COLS/SECTIONS columns (7 x 16), each
// with its own data channel that shifts out its columns in turn, adds a
// CRC-32 word, 8b/10b encodes and serializes the frame on sdout[s] at two
// bits per clock. Reading a column shifts zeros into it, which resets the
// counters for the next frame. One frame per section is 193 words,
// 3860 clocks of the serializer; the matrix is read in 6144 clocks plus
// stalls.
// Configuration arrives through the SPI slave: each 16-bit word loads eight
// bits into the 240-bit configuration chain of one column (thresholds,
// DAC codes, mode and mask of its eight pixels). The DAC codes and mode
// bits go to the analog front ends and are brought out as ports; so are the
// pixel hit pulses, for monitoring.
// The block structure, sizes and protocols follow the chip. This design
// runs everything from one clock: in the chip the ToT counters run at
// 100 MHz and the serializer and SPI logic at 320 MHz.
module metpc_top #(
  parameter int unsigned COLS     = 112,
  parameter int unsigned ROWS     = 8,
  parameter int unsigned SECTIONS = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shutter,
  input  logic [COLS*ROWS-1:0]     local_tot,
  input  logic [COLS*ROWS-1:0]     sum_tot,
  input  logic                     spi_sclk,
  input  logic                     spi_sdi,
  input  logic                     spi_ss_n,
  output logic                     spi_sdo,
  output logic [SECTIONS-1:0]      sdout,
  output logic [SECTIONS-1:0]      readout_busy,
  output logic [COLS*ROWS*8-1:0]   dac_code,
  output logic [COLS*ROWS-1:0]     mode,
  output logic [COLS*ROWS-1:0]     hit
);
  localparam int unsigned CPS          = COLS / SECTIONS;
  localparam int unsigned BITS_PER_COL = ROWS * metpc_pkg::NUM_THR * metpc_pkg::CNT_W;

  logic                      shutter_q;
  logic                      ro_start;
  logic [COLS-1:0]           cfg_sel_n, cfg_in, rd, rd_out;
  logic                      cfg_data;
  logic                      spi_vld;
  logic [metpc_pkg::SPI_WORD_W-1:0] spi_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shutter_q <= 1'b0;
    else        shutter_q <= shutter;
  end
  assign ro_start = shutter && !shutter_q;

  spi_slave #(.WORD_W(metpc_pkg::SPI_WORD_W)) u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .sdi(spi_sdi), .ss_n(spi_ss_n), .sdo(spi_sdo),
    .word_valid(spi_vld), .word(spi_word)
  );

  config_loader #(.SECTIONS(SECTIONS), .COLS_PER_SEC(CPS)) u_cfgld (
    .clk, .rst_n, .word_valid(spi_vld), .word(spi_word),
    .cfg_sel_n, .cfg_data, .busy(), .addr_err()
  );
  assign cfg_in = {COLS{cfg_data}};

  pixel_matrix #(.COLS(COLS), .ROWS(ROWS)) u_matrix (
    .clk, .rst_n, .shutter, .local_tot, .sum_tot,
    .cfg_sel_n, .cfg_in, .rd, .rd_out, .dac_code, .mode, .hit
  );

  for (genvar s = 0; s < SECTIONS; s++) begin : g_sec
    section_readout #(.COLS_PER_SEC(CPS), .BITS_PER_COL(BITS_PER_COL)) u_sec (
      .clk, .rst_n, .start(ro_start),
      .rd(rd[s*CPS +: CPS]), .col_data(rd_out[s*CPS +: CPS]),
      .sdout(sdout[s]), .busy(readout_busy[s])
    );
  end
endmodule
