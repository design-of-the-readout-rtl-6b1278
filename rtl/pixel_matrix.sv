// pixel_matrix -- the COLS x ROWS METPC pixel matrix (112 x 8 in the chip).
//
// Pixel (c, r) sits at column c, row r; row 0 is at the bottom, next to the
// periphery. The matrix only wires pixels together:
//  * local ToT network: each pixel gets its own local ToT and those of its
//    eight neighbours (0 outside the matrix);
//  * sum ToT network: the summing node of pixel (c, r) collects pixels
//    (c..c+1, r..r+1), so pixel (c, r) receives the sum ToTs of the nodes of
//    (c, r), (c-1, r), (c, r-1) and (c-1, r-1). Where the summing node sits
//    is this design's reading of the chip's inter-pixel network;
//  * configuration chain per column: cfg_in[c] enters row 0 and moves up;
//  * readout chain per column: the top pixel shifts in 0, data moves down
//    and leaves row 0 on rd_out[c]; 8 x 48 = 384 bits per column.
// Flat vectors index pixel (c, r) at c*ROWS + r.
module pixel_matrix
  import metpc_pkg::*;
#(
  parameter int unsigned COLS = 112,
  parameter int unsigned ROWS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shutter,
  input  logic [COLS*ROWS-1:0]     local_tot,
  input  logic [COLS*ROWS-1:0]     sum_tot,
  input  logic [COLS-1:0]          cfg_sel_n,
  input  logic [COLS-1:0]          cfg_in,
  input  logic [COLS-1:0]          rd,
  output logic [COLS-1:0]          rd_out,
  output logic [COLS*ROWS*8-1:0]   dac_code,
  output logic [COLS*ROWS-1:0]     mode,
  output logic [COLS*ROWS-1:0]     hit
);
  // Padded copies with a one-pixel border of zeros.
  logic [COLS+1:0][ROWS+1:0] lt, st;
  logic [COLS-1:0][ROWS:0]   cfg_ch, rd_ch;

  always_comb begin
    lt = '0;
    st = '0;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        lt[c+1][r+1] = local_tot[c*ROWS + r];
        st[c+1][r+1] = sum_tot[c*ROWS + r];
      end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    assign cfg_ch[c][0]    = cfg_in[c];
    assign rd_ch[c][ROWS]  = 1'b0;
    assign rd_out[c]       = rd_ch[c][0];
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic [8:0] ltn;
      logic [3:0] stn;
      // padded coordinates of this pixel: (c+1, r+1)
      assign ltn = {lt[c+2][r+2], lt[c+1][r+2], lt[c][r+2],
                    lt[c+2][r+1], lt[c][r+1],
                    lt[c+2][r],   lt[c+1][r],   lt[c][r],
                    lt[c+1][r+1]};
      assign stn = {st[c][r], st[c+1][r], st[c][r+1], st[c+1][r+1]};

      pixel_digital u_pix (
        .clk, .rst_n, .shutter,
        .local_tot(ltn), .sum_tot(stn),
        .cfg_sel_n(cfg_sel_n[c]), .cfg_in(cfg_ch[c][r]), .cfg_out(cfg_ch[c][r+1]),
        .rd(rd[c]), .rd_in(rd_ch[c][r+1]), .rd_out(rd_ch[c][r]),
        .dac_code(dac_code[(c*ROWS + r)*8 +: 8]),
        .mode(mode[c*ROWS + r]),
        .hit(hit[c*ROWS + r]),
        .energy(), .bin_values()
      );
    end
  end
endmodule
