// config_loader -- SPI configuration block: SPI words into column chains.
//
// Each 16-bit SPI word {section[15:13], column[12:9], unused[8], data[7:0]}
// addresses one pixel column, column c = section*COLS_PER_SEC + column.
// The loader pulls that column's select low for eight clocks and shifts the
// data byte into its configuration chain, MSB first, one bit per clock; all
// other columns stay deselected and keep their contents. Thirty words load
// the 8 x 30 = 240 configuration bits of a column. Words addressing a
// section that does not exist are dropped and flagged on `addr_err` for one
// clock; a word arriving while a byte is still shifting is dropped too.
// The addressing follows the chip; the byte-per-word loading is this
// design's choice.
module config_loader #(
  parameter int unsigned SECTIONS     = 7,
  parameter int unsigned COLS_PER_SEC = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             word_valid,
  input  logic [15:0]                      word,
  output logic [SECTIONS*COLS_PER_SEC-1:0] cfg_sel_n,
  output logic                             cfg_data,
  output logic                             busy,
  output logic                             addr_err
);
  localparam int unsigned NCOL = SECTIONS * COLS_PER_SEC;
  localparam int unsigned AW   = $clog2(NCOL);

  logic [7:0]    data;
  logic [3:0]    left;       // bits still to shift
  logic [AW-1:0] col;
  logic          in_range;

  assign in_range = (int'(word[15:13]) < SECTIONS) && (int'(word[12:9]) < COLS_PER_SEC);
  assign busy     = (left != 4'd0);
  assign cfg_data = data[7];

  always_comb begin
    cfg_sel_n = '1;
    if (busy) cfg_sel_n[col] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data     <= '0;
      left     <= '0;
      col      <= '0;
      addr_err <= 1'b0;
    end else begin
      addr_err <= 1'b0;
      if (busy) begin
        data <= {data[6:0], 1'b0};
        left <= left - 4'd1;
      end else if (word_valid) begin
        if (in_range) begin
          data <= word[7:0];
          left <= 4'd8;
          col  <= AW'(int'(word[15:13]) * COLS_PER_SEC + int'(word[12:9]));
        end else begin
          addr_err <= 1'b1;
        end
      end
    end
  end
endmodule
