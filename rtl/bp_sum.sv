// bp_sum: back-propagated sum for one hidden neuron j,
// O_j = sum_k L_k * w_kj^2.
//
// l_err holds the output-layer error terms L_k and w_col the layer-2
// coefficients w_kj that the same example used in its forward pass (they come
// out of a delay line, so later adaptations do not affect this example's
// backward pass). Timing, from the clock in which both are presented (clock
// 13 of the pipeline): the products M_kj are registered in clock 13 and their
// sum O_j in clock 14. This follows the architecture.
module bp_sum
  import nn_pkg::*;
#(
  parameter int N_OUT = N2_DEF
) (
  input  logic clk,
  input  fx_t  l_err [N_OUT],
  input  fx_t  w_col [N_OUT],
  output fx_t  o_sum
);

  fx_t m_prod [N_OUT];
  fx_t acc;

  always_ff @(posedge clk) begin
    for (int k = 0; k < N_OUT; k++) m_prod[k] <= fx_mul(l_err[k], w_col[k]);
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < N_OUT; k++) acc = acc + m_prod[k];
  end

  always_ff @(posedge clk) o_sum <= acc;

endmodule
