// rcm_channel: one coordinate x^(j) of the ring-coupled map.
//
// Each step computes
//     s = 1 - 2|x^(j)| + k^(j) * x^(j+1)
// and folds it back into [-1, 1]: a comparator for s > 1 selects s - 2, a
// comparator for s < -1 selects s + 2, and when neither fires (both
// comparator outputs inverted and ANDed) s passes unchanged. As in the
// reference block diagram, the three candidates are formed side by side and
// a multiport switch picks one by the control code 1*c1 + 2*c2 + 3*(!c1&!c2),
// so code 1 = subtract 2, code 2 = add 2, code 3 = pass. The result is held
// in a register (the diagram's unit delay "Memory").
//
// The coupling coefficient is +1 or -1, chosen by k_neg, so the product
// k * x^(j+1) is a conditional negation, not a multiplier; the map is only
// defined for k = +-1. In Q4.28 every operation here is exact.
//
// Interface and timing: `load` (priority) writes x0 into the register and
// `step` writes the next value, both on the rising clock edge; x is the
// registered state and x_nxt / sel describe the value the next step will
// write. One iteration per clock. The synchronous active-low reset to 0 and
// the load/step controls are this design's own choices.
module rcm_channel
  import rcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,      // write x0 into the state
  input  logic       step,      // advance one iteration
  input  q_t         x0,        // initial condition
  input  logic       k_neg,     // 1: k = -1, 0: k = +1
  input  q_t         x_couple,  // x^(j+1) of the neighbouring channel
  output q_t         x,         // current state x_n^(j)
  output q_t         x_nxt,     // x_{n+1}^(j)
  output logic [1:0] sel        // switch code: 1 sub 2, 2 add 2, 3 pass
);

  q_t x_q;
  q_t abs_x, kx, sum;
  q_t sub2, add2;
  logic c_gt, c_lt, c_in;

  always_comb begin
    abs_x = x_q[QW-1] ? -x_q : x_q;
    kx    = k_neg ? -x_couple : x_couple;
    sum   = Q_ONE - (abs_x <<< 1) + kx;
    // comparators and the inverter/AND pair
    c_gt  = sum > Q_ONE;
    c_lt  = sum < Q_MINUS1;
    c_in  = !c_gt && !c_lt;
    // the three subsystems
    sub2  = sum - Q_TWO;
    add2  = sum + Q_TWO;
    // control code of the multiport switch
    sel   = {1'b0, c_gt} + {c_lt, 1'b0} + (c_in ? 2'd3 : 2'd0);
    unique case (sel)
      2'd1:    x_nxt = sub2;
      2'd2:    x_nxt = add2;
      default: x_nxt = sum;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    x_q <= '0;
    else if (load) x_q <= x0;
    else if (step) x_q <= x_nxt;
  end

  assign x = x_q;

endmodule
