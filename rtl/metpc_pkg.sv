// metpc_pkg -- constants and types shared by the METPC pixel readout RTL.
//
// The METPC chip is a hybrid-pixel photon-counting readout ASIC: a 112 x 8
// matrix of 110 um pixels, each with charge-sharing correction by ToT
// comparison and four digitally programmable energy thresholds feeding four
// 12-bit LFSR counters. The numbers below are the chip's; the configuration
// bit layout (cfg_* positions) is this design's own choice.
package metpc_pkg;

  localparam int unsigned NUM_THR      = 4;   // energy thresholds per pixel
  localparam int unsigned TOT_W        = 5;   // ToT counter width (320 ns at 100 MHz)
  localparam int unsigned CNT_W        = 12;  // energy-bin counter depth
  localparam int unsigned DAC_W        = 8;   // DAC configuration register
  localparam int unsigned CFG_BITS     = NUM_THR*TOT_W + DAC_W + 2; // 30
  localparam int unsigned N_LOCAL      = 9;   // own local ToT + 8 neighbours
  localparam int unsigned N_SUM        = 4;   // summing nodes around a pixel
  localparam int unsigned SPI_WORD_W   = 16;

  // LFSR feedback taps of x^12 + x^11 + x^10 + x^4 + 1: bits 11, 10, 9, 3.
  localparam logic [CNT_W-1:0] LFSR_TAPS = 12'hE08;

  // CRC-32 (Ethernet) generator and start value.
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_INIT = 32'hFFFF_FFFF;

  // Configuration register layout (30 bits).
  localparam int unsigned CFG_THR_LSB  = 0;   // [19:0] thresholds, thr k at [5k+4:5k]
  localparam int unsigned CFG_DAC_LSB  = 20;  // [27:20] DAC code
  localparam int unsigned CFG_MODE_BIT = 28;
  localparam int unsigned CFG_MASK_BIT = 29;

  // Comparison (arbitration) state machine.
  typedef enum logic [1:0] {
    CMP_IDLE    = 2'd0,
    CMP_COUNT   = 2'd1,
    CMP_COMPARE = 2'd2,
    CMP_RESET   = 2'd3
  } cmp_state_e;

  // 8b/10b comma K28.5.
  localparam logic [7:0] K28_5 = 8'hBC;

endpackage
