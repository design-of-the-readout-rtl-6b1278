// compare_logic -- charge-sharing arbitration state machine of a pixel.
//
// IDLE:    wait for the OR of the four surrounding sum ToTs (`sum_or`) to be
//          high. Only in counting mode (`enable`).
// COUNT:   the ToT counter runs (`cnt_en`) while `sum_or` is high. Each clock
//          the local ToT is compared with the OR of the nine local ToTs
//          (`local_or`, i.e. the longest local ToT around). If `local_or` is
//          still high after the local ToT has ended, a neighbour collected
//          more charge and this pixel loses (so does a pixel whose local
//          ToT never rose). Falling `sum_or` ends COUNT.
// COMPARE: if the local ToT was seen and never lost, `hit` pulses for one
//          clock; the ToT count is valid in this cycle.
// RESET:   the ToT counter is cleared (`cnt_clr`); back to IDLE.
// The states and the use of the rising/falling sum-ToT edges follow the
// chip; sampling-based duration comparison, one-cycle hit and the handling
// of ties (two equal local ToTs both win) are this design's choices. Events
// arriving during COMPARE/RESET are not counted (dead time).
module compare_logic
  import metpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       sum_or,
  input  logic       local_tot,
  input  logic       local_or,
  output logic       cnt_en,
  output logic       cnt_clr,
  output logic       hit,
  output cmp_state_e state
);
  logic seen;   // local ToT has been high in this event
  logic lost;   // local ToT ended while a longer one was still high

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CMP_IDLE;
      seen  <= 1'b0;
      lost  <= 1'b0;
    end else begin
      unique case (state)
        CMP_IDLE: begin
          seen <= 1'b0;
          lost <= 1'b0;
          if (enable && sum_or) begin
            state <= CMP_COUNT;
            seen  <= local_tot;
            lost  <= local_or && !local_tot;
          end
        end
        CMP_COUNT: begin
          if (local_tot) seen <= 1'b1;
          if (!local_tot && local_or) lost <= 1'b1;
          if (!sum_or) state <= CMP_COMPARE;
        end
        CMP_COMPARE: state <= CMP_RESET;
        CMP_RESET:   state <= CMP_IDLE;
        default:     state <= CMP_IDLE;
      endcase
    end
  end

  // The first sample of `sum_or` (taken in IDLE) is counted too.
  assign cnt_en  = sum_or && ((state == CMP_COUNT) || (state == CMP_IDLE && enable));
  assign hit     = (state == CMP_COMPARE) && seen && !lost;
  assign cnt_clr = (state == CMP_RESET);
endmodule
