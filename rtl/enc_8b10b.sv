// enc_8b10b -- 8b/10b line encoder with running disparity.
//
// The byte HGFEDCBA is split into EDCBA (x), coded to six bits abcdei by the
// 5b/6b table, and HGF (y), coded to four bits fghj by the 3b/4b table;
// data symbols are D.x.y, control symbols (ki = 1) K.x.y. Each sub-block
// has two forms, chosen by the running disparity so that the line stays DC
// balanced; unbalanced forms flip the disparity. The tables are the
// standard ones of the 8b/10b code. `dout` is combinational for the current
// disparity with bit a at dout[0] and j at dout[9], so sending LSB first
// puts a on the line first. The disparity register (reset: negative) is
// updated at a clock edge with `en` high. Valid control symbols: K.28.0-7,
// K.23.7, K.27.7, K.29.7, K.30.7; other ki bytes are coded as data.
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       ki,
  input  logic [7:0] din,
  output logic [9:0] dout,
  output logic       rd_pos
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] t6;      // abcdei for negative disparity, a = t6[5]
  logic [3:0] t4;      // fghj for negative disparity, f = t4[3]
  logic [5:0] c6;
  logic [3:0] c4;
  logic       k28, kvalid, rd_mid, rd_out;
  logic       flip6, flip4;

  assign x = din[4:0];
  assign y = din[7:5];
  assign k28    = ki && (x == 5'd28);
  assign kvalid = ki && (k28 || (y == 3'd7 &&
                  (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30)));

  always_comb begin
    unique case (x)
      5'd0:  t6 = 6'b100111;  5'd1:  t6 = 6'b011101;
      5'd2:  t6 = 6'b101101;  5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101;  5'd5:  t6 = 6'b101001;
      5'd6:  t6 = 6'b011001;  5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001;  5'd9:  t6 = 6'b100101;
      5'd10: t6 = 6'b010101;  5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101;  5'd13: t6 = 6'b101100;
      5'd14: t6 = 6'b011100;  5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011;  5'd17: t6 = 6'b100011;
      5'd18: t6 = 6'b010011;  5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011;  5'd21: t6 = 6'b101010;
      5'd22: t6 = 6'b011010;  5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;  5'd25: t6 = 6'b100110;
      5'd26: t6 = 6'b010110;  5'd27: t6 = 6'b110110;
      5'd28: t6 = k28 ? 6'b001111 : 6'b001110;
      5'd29: t6 = 6'b101110;  5'd30: t6 = 6'b011110;
      default: t6 = 6'b101011;  // x = 31
    endcase
  end

  // Unbalanced 6b codes, and D.7, are complemented when disparity is positive.
  assign flip6 = ($countones(t6) != 3) || (x == 5'd7 && !k28);
  assign c6     = (rd_pos && flip6) ? ~t6 : t6;
  assign rd_mid = ($countones(t6) != 3) ? ~rd_pos : rd_pos;

  always_comb begin
    if (kvalid) begin
      unique case (y)
        3'd0: t4 = 4'b1011;  3'd1: t4 = 4'b0110;
        3'd2: t4 = 4'b1010;  3'd3: t4 = 4'b1100;
        3'd4: t4 = 4'b1101;  3'd5: t4 = 4'b0101;
        3'd6: t4 = 4'b1001;  default: t4 = 4'b0111;
      endcase
    end else begin
      unique case (y)
        3'd0: t4 = 4'b1011;  3'd1: t4 = 4'b1001;
        3'd2: t4 = 4'b0101;  3'd3: t4 = 4'b1100;
        3'd4: t4 = 4'b1101;  3'd5: t4 = 4'b1010;
        3'd6: t4 = 4'b0110;
        default: // D.x.P7, or D.x.A7 where P7 would make a run of five
          t4 = ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)))
               ? 4'b0111 : 4'b1110;
      endcase
    end
  end

  // K codes are always complemented at positive disparity; data codes only
  // when unbalanced, and D.x.3.
  assign flip4  = kvalid || ($countones(t4) != 2) || (y == 3'd3);
  assign c4     = (rd_mid && flip4) ? ~t4 : t4;
  assign rd_out = ($countones(t4) != 2) ? ~rd_mid : rd_mid;

  assign dout = {c4[0], c4[1], c4[2], c4[3],
                 c6[0], c6[1], c6[2], c6[3], c6[4], c6[5]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_pos <= 1'b0;
    else if (en) rd_pos <= rd_out;
  end
endmodule
