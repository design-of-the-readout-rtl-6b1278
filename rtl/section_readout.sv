// section_readout -- data channel of one section of 16 columns.
//
// A readout frame starts with `start`: column_readout reads the section's
// columns and packs the bits into 32-bit data words; each word handed to
// the serializer also enters a running CRC-32, and after the last data word
// the CRC of the frame is sent as one more word. The serializer 8b/10b
// encodes every byte and sends it on the DDR output; between frames it
// sends K28.5 commas, so a receiver finds the frame as the first non-comma
// symbol after idle. A frame of the chip's section carries 192 data words
// plus the CRC word. The chain column buffer -> CRC -> 8b/10b -> serializer
// follows the chip; the framing (no start marker, CRC as trailing word) is
// this design's choice.
module section_readout #(
  parameter int unsigned COLS_PER_SEC = 16,
  parameter int unsigned BITS_PER_COL = 384
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic [COLS_PER_SEC-1:0] rd,
  input  logic [COLS_PER_SEC-1:0] col_data,
  output logic                    sdout,
  output logic                    busy
);
  logic        w_valid, w_ready, w_last;
  logic [31:0] w_data;
  logic        crc_pending;
  logic        ser_vld, ser_rdy;
  logic [31:0] ser_data;
  logic [31:0] crc;
  logic        crc_vld_unused;
  logic        data_take;
  logic        active_q;

  column_readout #(.COLS_PER_SEC(COLS_PER_SEC), .BITS_PER_COL(BITS_PER_COL)) u_col (
    .clk, .rst_n, .start, .rd, .col_data,
    .word_valid(w_valid), .word(w_data), .word_ready(w_ready), .last(w_last), .busy()
  );

  // Data words first; the CRC word goes out once the last data word is taken.
  assign ser_vld   = crc_pending || w_valid;
  assign ser_data  = crc_pending ? crc : w_data;
  assign w_ready   = ser_rdy && !crc_pending;
  assign data_take = w_valid && w_ready;

  crc32_gen u_crc (
    .clk, .rst_n, .init(start && !active_q), .din_vld(data_take), .din(w_data),
    .dout(crc), .dout_vld(crc_vld_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        crc_pending <= 1'b0;
    else if (data_take && w_last)      crc_pending <= 1'b1;
    else if (crc_pending && ser_rdy)   crc_pending <= 1'b0;
  end

  ddr_serializer u_ser (
    .clk, .rst_n, .din(ser_data), .ki(4'b0000), .din_vld(ser_vld), .din_rdy(ser_rdy), .sdout
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      active_q <= 1'b0;
    else if (start)                 active_q <= 1'b1;
    else if (crc_pending && ser_rdy) active_q <= 1'b0;
  end
  assign busy = active_q;
endmodule
