// ddr_serializer -- 32-bit word to double-data-rate serial stream.
//
// A word offered on din (with a control flag per byte in ki) is taken into
// the data register when din_vld and din_rdy are both high. A byte counter
// (the FSM) then selects byte 0, 1, 2, 3 in turn; each byte is 8b/10b
// encoded and the 10-bit symbol is split into its even bits (a, c, e, f, h)
// and odd bits (b, d, i, g, j). The even shift register moves on the
// falling clock edge, the odd one on the rising edge, and the clock itself
// selects which register drives `sdout` (even while clk is low, odd while
// it is high). Two bits leave per clock, bit a first, so one symbol takes
// five clocks and one word twenty (640 Mb/s at the chip's 320 MHz). When no
// word is waiting at a word boundary a K28.5 comma symbol is sent instead.
// din_rdy is high for one clock per symbol slot, at byte 0.
// Clock-as-data multiplexing follows the chip's serializer; the symbol
// counter replacing its pulse generators and the idle commas are this
// design's choices.
module ddr_serializer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] din,
  input  logic [3:0]  ki,
  input  logic        din_vld,
  output logic        din_rdy,
  output logic        sdout
);
  logic [2:0]  ph;          // bit-pair within the symbol, 0..4
  logic [1:0]  bsel;        // byte of the data register being sent next
  logic [31:0] data_reg;
  logic [3:0]  ki_reg;
  logic        load;
  logic [7:0]  byte_sel;
  logic        ki_sel;
  logic [9:0]  code;
  logic [9:0]  code_cur;
  logic        rd_pos;
  logic [4:0]  odd_sr, even_sr;

  assign load    = (ph == 3'd4);
  assign din_rdy = load && (bsel == 2'd0);

  // mux4: byte 0 comes straight from din (or is a comma), bytes 1..3 from dataReg.
  always_comb begin
    if (bsel == 2'd0) begin
      byte_sel = din_vld ? din[7:0] : metpc_pkg::K28_5;
      ki_sel   = din_vld ? ki[0]    : 1'b1;
    end else begin
      byte_sel = data_reg[8*bsel +: 8];
      ki_sel   = ki_reg[bsel];
    end
  end

  enc_8b10b u_enc (
    .clk, .rst_n, .en(load), .ki(ki_sel), .din(byte_sel), .dout(code), .rd_pos
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= 3'd4;
      bsel     <= 2'd0;
      data_reg <= '0;
      ki_reg   <= '0;
      code_cur <= '0;
    end else begin
      ph <= load ? 3'd0 : ph + 3'd1;
      if (load) begin
        code_cur <= code;
        if (bsel == 2'd0) begin
          if (din_vld) begin
            data_reg <= din;
            ki_reg   <= ki;
            bsel     <= 2'd1;
          end
        end else begin
          bsel <= bsel + 2'd1;
        end
      end
    end
  end

  // Odd bits: loaded/shifted on the rising edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         odd_sr <= '0;
    else if (ph == 3'd0) odd_sr <= {code_cur[9], code_cur[7], code_cur[5], code_cur[3], code_cur[1]};
    else                odd_sr <= {1'b0, odd_sr[4:1]};
  end

  // Even bits: loaded/shifted on the falling edge, half a clock earlier.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)         even_sr <= '0;
    else if (ph == 3'd0) even_sr <= {code_cur[8], code_cur[6], code_cur[4], code_cur[2], code_cur[0]};
    else                even_sr <= {1'b0, even_sr[4:1]};
  end

  // mux2 driven by the clock.
  assign sdout = clk ? odd_sr[0] : even_sr[0];
endmodule
