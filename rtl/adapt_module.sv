// adapt_module: gradient step for one layer ("w, theta adapt module").
//
// From the error terms err_i = dE/dy_i of the layer and the activations act_j
// of the layer below that the same example used, it forms
//   theta_dec_i = delta * err_i            in the clock err/act are presented
//   N_ij        = err_i * act_j            registered in that clock
//   w_dec_ij    = delta * N_ij             in the following clock
// The parameter registers subtract theta_dec one clock and w_dec the next, so
// for layer 2 the bias is adapted in pipeline clock 13 and the coefficients in
// clock 14, for layer 1 in clocks 16 and 17. delta is the adaptation step size
// (unsigned, DELTA_FRAC fraction bits) and must stay constant while training.
// The split over two clocks follows the architecture; the number format of
// delta is this design's choice.
module adapt_module
  import nn_pkg::*;
#(
  parameter int N_OUT = N2_DEF,
  parameter int N_IN  = N1_DEF
) (
  input  logic   clk,
  input  delta_t delta,
  input  fx_t    err [N_OUT],
  input  fx_t    act [N_IN],
  output fx_t    theta_dec [N_OUT],
  output fx_t    w_dec [N_OUT][N_IN]
);

  fx_t n_prod [N_OUT][N_IN];

  for (genvar i = 0; i < N_OUT; i++) begin : g_row
    assign theta_dec[i] = fx_scale(err[i], delta);
    for (genvar j = 0; j < N_IN; j++) begin : g_col
      always_ff @(posedge clk) n_prod[i][j] <= fx_mul(err[i], act[j]);
      assign w_dec[i][j] = fx_scale(n_prod[i][j], delta);
    end
  end

endmodule
