// fp_module: one neuron of the forward pass, y = f(sum_j w_j z_j + theta).
//
// Timing, counted from the clock in which z_in and w_row are presented
// (clock 1):
//   clock 1     all N_IN products w_j * z_j are registered   (A or D)
//   clock 2     their sum plus theta is registered on y_out  (B or G);
//               theta is read in clock 2
//   clocks 3-5  activation; z_out is valid from clock 6      (C or I)
// With ACT_SIGMOID = 1 the activation is the three-clock sigmoid look-up;
// with ACT_SIGMOID = 0 it is the identity, passed through three registers so
// that the schedule is the same for both kinds of layer.
// The per-neuron module, the one-clock product and sum steps and the
// three-clock sigmoid follow the architecture; the equal latency of the
// linear activation is this design's choice.
module fp_module
  import nn_pkg::*;
#(
  parameter int N_IN        = N0_DEF,
  parameter bit ACT_SIGMOID = 1'b1
) (
  input  logic clk,
  input  fx_t  z_in  [N_IN],
  input  fx_t  w_row [N_IN],
  input  fx_t  theta,
  output fx_t  y_out,
  output fx_t  z_out
);

  fx_t prod [N_IN];
  fx_t sum_c;

  always_ff @(posedge clk) begin
    for (int j = 0; j < N_IN; j++) prod[j] <= fx_mul(w_row[j], z_in[j]);
  end

  always_comb begin
    sum_c = theta;
    for (int j = 0; j < N_IN; j++) sum_c = sum_c + prod[j];
  end

  always_ff @(posedge clk) y_out <= sum_c;

  if (ACT_SIGMOID) begin : g_sigmoid
    sigmoid_lut u_sig (.clk(clk), .x(y_out), .y(z_out));
  end else begin : g_linear
    delay_line #(.WIDTH(FX_W), .DEPTH(3)) u_lin (.clk(clk), .din(y_out), .dout(z_out));
  end

endmodule
