// pixel_digital -- digital part of one METPC pixel.
//
// Event path (counting mode, shutter = 0):
//   sum_tot[3:0]  --OR-GATE--> sum_or   : starts/ends an event, sets the
//                                         measured energy (ToT count)
//   local_tot[8:0]--OR-GATE--> local_or : longest local ToT in the 3x3
//   compare_logic decides whether local_tot[0] is that longest ToT; if so
//   the ToT count is compared with the four thresholds and the LFSR of
//   the energy bin it falls into is advanced by one step.
// Readout (shutter = 1): each `rd` pulse shifts the chain
//   rd_in -> bin0 -> bin1 -> bin2 -> bin3 -> rd_out (48 bits per pixel).
// Configuration: while cfg_sel_n is low the 30-bit configuration register
//   shifts cfg_in -> [29] ... [0] -> cfg_out.
// local_tot[0] is the pixel's own discriminator; [8:1] come from the eight
// neighbours. sum_tot holds the summing-discriminator outputs of the four
// summing nodes at the pixel's corners. The bin order in the readout chain
// is this design's choice.
module pixel_digital #(
  parameter int unsigned      NTHR     = 4,
  parameter int unsigned      TOT_W    = 5,
  parameter int unsigned      CNT_W    = 12,
  parameter int unsigned      CFG_BITS = metpc_pkg::CFG_BITS,
  parameter logic [CNT_W-1:0] TAPS     = metpc_pkg::LFSR_TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shutter,
  input  logic [metpc_pkg::N_LOCAL-1:0]        local_tot,
  input  logic [metpc_pkg::N_SUM-1:0]          sum_tot,
  input  logic                    cfg_sel_n,
  input  logic                    cfg_in,
  output logic                    cfg_out,
  input  logic                    rd,
  input  logic                    rd_in,
  output logic                    rd_out,
  output logic [metpc_pkg::DAC_W-1:0]          dac_code,
  output logic                    mode,
  output logic                    hit,
  output logic [TOT_W-1:0]        energy,
  output logic [NTHR*CNT_W-1:0]   bin_values
);
  logic             local_or, sum_or;
  logic             cnt_en, cnt_clr, cnt_sat;
  metpc_pkg::cmp_state_e       state;
  logic [CFG_BITS-1:0] cfg;
  logic [NTHR-1:0]  wr;
  logic [NTHR:0]    chain;

  tot_or_gate #(.N(metpc_pkg::N_LOCAL)) u_or_local (.tot_in(local_tot), .tot_or(local_or));
  tot_or_gate #(.N(metpc_pkg::N_SUM))u_or_sum   (.tot_in(sum_tot),   .tot_or(sum_or));

  compare_logic u_cmp (
    .clk, .rst_n, .enable(!shutter),
    .sum_or, .local_tot(local_tot[0]), .local_or,
    .cnt_en, .cnt_clr, .hit, .state
  );

  tot_counter #(.W(TOT_W)) u_tot (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .count(energy), .sat(cnt_sat)
  );

  config_register #(.CFG_BITS(CFG_BITS)) u_cfg (
    .clk, .rst_n, .select_n(cfg_sel_n), .sin(cfg_in), .sout(cfg_out), .cfg
  );

  assign dac_code = cfg[metpc_pkg::CFG_DAC_LSB +: metpc_pkg::DAC_W];
  assign mode     = cfg[metpc_pkg::CFG_MODE_BIT];

  digital_threshold #(.NTHR(NTHR), .W(TOT_W)) u_thr (
    .clk, .rst_n, .hit, .energy,
    .thr(cfg[metpc_pkg::CFG_THR_LSB +: NTHR*TOT_W]), .mask(cfg[metpc_pkg::CFG_MASK_BIT]), .wr
  );

  assign chain[0] = rd_in;
  for (genvar k = 0; k < NTHR; k++) begin : g_bin
    energy_bin_lfsr #(.W(CNT_W), .TAPS(TAPS)) u_bin (
      .clk, .rst_n, .shutter, .wr(wr[k]), .rd,
      .data_in(chain[k]), .data_out(chain[k+1]),
      .value(bin_values[k*CNT_W +: CNT_W])
    );
  end
  assign rd_out = chain[NTHR];
endmodule
