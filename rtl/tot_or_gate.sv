// tot_or_gate -- the OR-GATE unit of a METPC pixel.
//
// ORs N asynchronous ToT pulses. Since every ToT pulse of one event starts
// at (nearly) the same time, the output rises with the first input and falls
// with the last one: its width equals the width of the longest (largest)
// ToT. This lets the comparison logic compare the local ToT with one signal
// instead of eight. The chip builds it from a tree of standard two-input OR
// cells; here it is a reduction OR and the tree is left to synthesis.
// Purely combinational, no clock.
module tot_or_gate #(
  parameter int unsigned N = 9
) (
  input  logic [N-1:0] tot_in,
  output logic         tot_or
);
  assign tot_or = |tot_in;
endmodule
