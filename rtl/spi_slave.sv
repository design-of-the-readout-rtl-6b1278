// spi_slave -- slow-control SPI slave (CPOL = 0, CPHA = 1, MSB first).
//
// SCLK, SS_n and SDI are synchronised into the system clock with two
// flip-flops each and their edges detected there, so the system clock must
// be at least 8 times SCLK (the chip runs SCLK at 1/16 of it). While SS_n is
// low, SDI is sampled at each falling SCLK edge; after 16 bits the word is
// presented on `word` with a one-clock `word_valid`. The word layout is
// {section[15:13], column[12:9], unused[8], data[7:0]}.
// SDO changes at each rising SCLK edge. To let the master verify what it
// wrote, SDO shifts out, MSB first, the previous complete word received;
// it is held low while SS_n is high. The SPI mode, word format and echo
// function follow the chip; echoing the previous word (rather than the
// current one with a one-bit delay) and the absence of read commands are
// this design's choices.
module spi_slave #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk,
  input  logic              sdi,
  input  logic              ss_n,
  output logic              sdo,
  output logic              word_valid,
  output logic [WORD_W-1:0] word
);
  localparam int unsigned CW = $clog2(WORD_W + 1);

  logic [2:0]        sclk_s;
  logic [1:0]        sdi_s;
  logic [1:0]        ss_s;
  logic              sclk_rise, sclk_fall, sel;
  logic [WORD_W-1:0] shreg, echo;
  logic [CW-1:0]     rcnt, fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      sdi_s  <= '0;
      ss_s   <= '1;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      sdi_s  <= {sdi_s[0], sdi};
      ss_s   <= {ss_s[0], ss_n};
    end
  end

  assign sel       = !ss_s[1];
  assign sclk_rise = sel && (sclk_s[2:1] == 2'b01);
  assign sclk_fall = sel && (sclk_s[2:1] == 2'b10);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      echo       <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      rcnt       <= '0;
      fcnt       <= '0;
      sdo        <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (!sel) begin
        rcnt <= '0;
        fcnt <= '0;
        sdo  <= 1'b0;
      end else begin
        if (sclk_rise) begin
          sdo  <= (rcnt < CW'(WORD_W)) ? echo[WORD_W - 1 - int'(rcnt)] : 1'b0;
          rcnt <= rcnt + CW'(1);
        end
        if (sclk_fall) begin
          shreg <= {shreg[WORD_W-2:0], sdi_s[1]};
          if (fcnt == CW'(WORD_W-1)) begin
            word       <= {shreg[WORD_W-2:0], sdi_s[1]};
            echo       <= {shreg[WORD_W-2:0], sdi_s[1]};
            word_valid <= 1'b1;
            fcnt       <= '0;
            rcnt       <= '0;
          end else begin
            fcnt <= fcnt + CW'(1);
          end
        end
      end
    end
  end
endmodule
