// cost_unit: output-layer error term L_j = dE/dy_j^q and the example's cost
// E = 1/2 sum_j (z_j^q - t_j)^2.
//
// Timing, from the clock in which the network output z_out and the desired
// values t are presented (clock 11 of the pipeline):
//   clock 11  J_j = z_j - t_j, K_j = 1 - z_j registered (z_j kept alongside)
//   clock 12  L_j registered: J_j * z_j * K_j for a sigmoid output layer
//             (OUT_SIGMOID = 1), J_j for a linear output layer; the cost E is
//             registered in the same clock.
// The steps and their clocks follow the architecture. The cost output is the
// error of the algorithm's error-calculation step, made visible for
// monitoring; the adaptation does not use it.
module cost_unit
  import nn_pkg::*;
#(
  parameter int N           = N2_DEF,
  parameter bit OUT_SIGMOID = 1'b0
) (
  input  logic clk,
  input  fx_t  z_out [N],
  input  fx_t  t     [N],
  output fx_t  l_err [N],
  output fx_t  cost
);

  fx_t j_diff [N];
  fx_t k_comp [N];
  fx_t z_hold [N];
  fx_t e_sum;

  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      j_diff[j] <= z_out[j] - t[j];
      k_comp[j] <= FX_ONE - z_out[j];
      z_hold[j] <= z_out[j];
    end
  end

  always_comb begin
    e_sum = '0;
    for (int j = 0; j < N; j++) e_sum = e_sum + fx_mul(j_diff[j], j_diff[j]);
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      if (OUT_SIGMOID) l_err[j] <= fx_mul(fx_mul(j_diff[j], z_hold[j]), k_comp[j]);
      else             l_err[j] <= j_diff[j];
    end
    cost <= e_sum >>> 1;
  end

endmodule
