// bp_deriv: error term of one hidden (sigmoid) neuron,
// P_j = C_j (1 - C_j) O_j, i.e. dE/dy_j^1.
//
// Timing (pipeline clocks):
//   clock 6   c_act = C_j presented; F_j = 1 - C_j registered
//   clock 7   H_j = C_j * F_j registered (C_j kept one clock for this)
//   clocks 8-14  H_j travels down a 7-stage delay line with its example
//   clock 15  o_sum = O_j presented; P_j = H_j * O_j registered on p_err
// The schedule of F, H and P follows the architecture. Where the
// architecture's variable table multiplies O_j by F_j = 1 - C_j alone, this
// module uses H_j = C_j (1 - C_j), which is what the back-propagation
// equation for a sigmoid neuron requires.
module bp_deriv
  import nn_pkg::*;
#(
  parameter int H_HOLD = 7
) (
  input  logic clk,
  input  fx_t  c_act,
  input  fx_t  o_sum,
  output fx_t  p_err
);

  fx_t f_comp, c_hold, h_der, h_late;

  always_ff @(posedge clk) begin
    f_comp <= FX_ONE - c_act;
    c_hold <= c_act;
    h_der  <= fx_mul(c_hold, f_comp);
  end

  delay_line #(.WIDTH(FX_W), .DEPTH(H_HOLD)) u_hold (.clk(clk), .din(h_der), .dout(h_late));

  always_ff @(posedge clk) p_err <= fx_mul(h_late, o_sum);

endmodule
