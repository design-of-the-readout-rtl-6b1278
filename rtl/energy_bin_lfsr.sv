// energy_bin_lfsr -- 12-bit energy-bin counter with LFSR structure.
//
// Counting mode (shutter = 0): each `wr` pulse advances the register by one
// LFSR step: all bits shift from Bit0 towards Bit11 and Bit0 takes the XNOR
// of the tap bits. With the taps of x^12 + x^11 + x^10 + x^4 + 1 (bits 11,
// 10, 9, 3) and the reset value 0 the register walks through 4095 distinct
// states, so the count is recovered off chip by looking the value up in the
// LFSR sequence. XNOR (rather than XOR) feedback is this design's choice: it
// lets the all-zero reset value count, 0 -> 1 -> 3 -> 7 ...
// Readout mode (shutter = 1): each `rd` pulse shifts the register as a
// plain shift register, Bit0 <- data_in, data_out = Bit11, so the bins of a
// column form one serial chain. Shifting zeros in leaves the register at
// 0, ready for the next frame.
// The chip switches the flip-flop clock between a write clock and the
// system clock with a multiplexer; here one clock is used and the two
// enables are multiplexed instead.
module energy_bin_lfsr #(
  parameter int unsigned   W    = 12,
  parameter logic [W-1:0]  TAPS = 12'hE08
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shutter,
  input  logic         wr,
  input  logic         rd,
  input  logic         data_in,
  output logic         data_out,
  output logic [W-1:0] value
);
  logic fb;
  assign fb = ~(^(value & TAPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                value <= '0;
    else if (!shutter && wr)   value <= {value[W-2:0], fb};
    else if (shutter && rd)    value <= {value[W-2:0], data_in};
  end
  assign data_out = value[W-1];
endmodule
