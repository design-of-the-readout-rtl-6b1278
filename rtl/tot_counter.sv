// tot_counter -- digitises a ToT pulse by counting clock edges.
//
// While `en` is high the counter increments at every rising clock edge, so
// a ToT pulse of T ns gives about T/10 counts at the chip's 100 MHz ToT
// clock. The chip uses 5 bits (ToT up to 320 ns). The overflow behaviour is
// this design's choice: the counter saturates at its maximum and flags it
// with `sat`, so a very long pulse lands in the highest energy bin rather
// than wrapping to a low one. `clr` (the RESET state of the comparison
// logic) clears it synchronously and has priority over `en`.
module tot_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         sat
);
  assign sat = &count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            count <= '0;
    else if (clr)          count <= '0;
    else if (en && !sat)   count <= count + 1'b1;
  end
endmodule
