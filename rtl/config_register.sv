// config_register -- 30-bit per-pixel configuration shift register.
//
// Holds the four 5-bit digital thresholds, the 8-bit DAC code, the mode
// bit and the mask bit (layout in metpc_pkg: [19:0] thresholds, [27:20]
// DAC, [28] mode, [29] mask; the layout is this design's choice). While
// `select_n` is low the register shifts one bit per rising clock edge: the
// new bit enters at the MSB and the LSB leaves on `sout`, which feeds the
// MSB of the pixel above. Eight pixels so form a 240-bit chain loaded from
// the bottom of the column, as in the chip. With `select_n` high the
// contents hold.
module config_register #(
  parameter int unsigned CFG_BITS = 30
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                select_n,
  input  logic                sin,
  output logic                sout,
  output logic [CFG_BITS-1:0] cfg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cfg <= '0;
    else if (!select_n) cfg <= {sin, cfg[CFG_BITS-1:1]};
  end
  assign sout = cfg[0];
endmodule
