// digital_threshold -- the four digital energy thresholds of a pixel.
//
// When the comparison logic reports a hit, the digitised energy (ToT
// count) is compared with four 5-bit thresholds taken from the pixel's
// configuration register, which set the lower and upper limits of four
// energy bins. With WINDOWED = 1 (the default) a hit is sorted into one
// bin: counter k receives a one-clock write pulse when the energy exceeds
// threshold k but not threshold k+1; the top counter takes everything above
// the highest threshold. The thresholds are meant to ascend. With
// WINDOWED = 0, counter k counts every hit above threshold k, so the
// counters hold an integral spectrum (the pattern of the chip's counter
// simulation, where every write pulse of a higher counter coincides with
// pulses on all lower ones). "Exceeds" is strict: energy > threshold.
// A set mask bit suppresses all counting. The write pulses are registered:
// they appear one clock after `hit`. Bin sorting follows the chip
// description; the strict comparison and the option are this design's.
module digital_threshold #(
  parameter int unsigned NTHR = 4,
  parameter int unsigned W    = 5,
  parameter bit          WINDOWED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hit,
  input  logic [W-1:0]        energy,
  input  logic [NTHR*W-1:0]   thr,
  input  logic                mask,
  output logic [NTHR-1:0]     wr
);
  logic [NTHR-1:0] above, bin;

  always_comb begin
    for (int k = 0; k < NTHR; k++)
      above[k] = energy > thr[k*W +: W];
    for (int k = 0; k < NTHR; k++)
      bin[k] = above[k] && (!WINDOWED || k == NTHR - 1 || !above[(k + 1) % NTHR]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr <= '0;
    else        wr <= (hit && !mask) ? bin : '0;
  end
endmodule
