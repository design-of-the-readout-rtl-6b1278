// column_readout -- readout sequencer and data buffer of one section.
//
// On `start` the columns of the section are read one after the other,
// column 0 first. For a column, rd[col] is held high while its serial chain
// shifts BITS_PER_COL times (8 pixels x 4 bins x 12 bits = 384 in the chip);
// the bit present on col_data[col] is captured at each shift, so the first
// bit taken is the one already waiting at the bottom of the chain. Bits
// are packed into 32-bit words, first bit into bit 0. A finished word is
// offered with word_valid until word_ready; shifting pauses while a new
// word is complete and the previous one is still waiting. `last` marks the
// final word of the frame. The column order follows the chip; the packing
// order and the backpressure are this design's choices.
module column_readout #(
  parameter int unsigned COLS_PER_SEC = 16,
  parameter int unsigned BITS_PER_COL = 384
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic [COLS_PER_SEC-1:0] rd,
  input  logic [COLS_PER_SEC-1:0] col_data,
  output logic                    word_valid,
  output logic [31:0]             word,
  input  logic                    word_ready,
  output logic                    last,
  output logic                    busy
);
  localparam int unsigned CW = (COLS_PER_SEC > 1) ? $clog2(COLS_PER_SEC) : 1;
  localparam int unsigned BW = $clog2(BITS_PER_COL + 1);

  logic          active;
  logic [CW-1:0] col;
  logic [BW-1:0] bitcnt;
  logic [4:0]    wbit;
  logic [31:0]   acc;
  logic          shift, word_done, final_bit;

  assign final_bit = (col == CW'(COLS_PER_SEC - 1)) && (bitcnt == BW'(BITS_PER_COL - 1));
  assign word_done = (wbit == 5'd31) || final_bit;
  assign shift     = active && !(word_done && word_valid && !word_ready);

  always_comb begin
    rd = '0;
    if (shift) rd[col] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      col        <= '0;
      bitcnt     <= '0;
      wbit       <= '0;
      acc        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      last       <= 1'b0;
    end else begin
      if (word_valid && word_ready) begin
        word_valid <= 1'b0;
        last       <= 1'b0;
      end
      if (start && !active) begin
        active <= 1'b1;
        col    <= '0;
        bitcnt <= '0;
        wbit   <= '0;
        acc    <= '0;
      end else if (shift) begin
        if (word_done) begin
          word       <= acc | (32'(col_data[col]) << wbit);
          word_valid <= 1'b1;
          last       <= final_bit;
          acc        <= '0;
          wbit       <= '0;
        end else begin
          acc[wbit] <= col_data[col];
          wbit      <= wbit + 5'd1;
        end
        if (bitcnt == BW'(BITS_PER_COL - 1)) begin
          bitcnt <= '0;
          if (final_bit) active <= 1'b0;
          else           col    <= col + CW'(1);
        end else begin
          bitcnt <= bitcnt + BW'(1);
        end
      end
    end
  end

  assign busy = active || word_valid;
endmodule
