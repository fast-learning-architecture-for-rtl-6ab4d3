// param_regs: the coefficient registers w_ij and bias registers theta_i of one
// layer (N_OUT neurons, N_IN inputs each).
//
// All values are visible at once on w and theta, since the forward pass reads
// a whole layer every clock. Two kinds of writes:
//   - host load: ld_en writes ld_data to one coefficient (ld_bias = 0,
//     position ld_row, ld_col) or one bias (ld_bias = 1, position ld_row);
//   - adaptation: theta_upd subtracts theta_dec from every bias and w_upd
//     subtracts w_dec from every coefficient, in the clock they are high.
// The control unit lets a host load through only while no example is in the
// pipeline, so loads and adaptations never meet; if they did, the adaptation
// would win. Reset clears all values to zero. Loading the initial values by
// the host and updating them from the adapt module follow the architecture;
// the load port and reset value are this design's choices.
module param_regs
  import nn_pkg::*;
#(
  parameter int N_OUT = N1_DEF,
  parameter int N_IN  = N0_DEF,
  parameter int IDX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_en,
  input  logic             ld_bias,
  input  logic [IDX_W-1:0] ld_row,
  input  logic [IDX_W-1:0] ld_col,
  input  fx_t              ld_data,
  input  logic             theta_upd,
  input  fx_t              theta_dec [N_OUT],
  input  logic             w_upd,
  input  fx_t              w_dec [N_OUT][N_IN],
  output fx_t              w [N_OUT][N_IN],
  output fx_t              theta [N_OUT]
);

  // Each value lives in a register of its own generate scope.
  for (genvar i = 0; i < N_OUT; i++) begin : g_row
    fx_t th_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        th_q <= '0;
      else if (theta_upd)
        th_q <= th_q - theta_dec[i];
      else if (ld_en && ld_bias && 32'(ld_row) == i)
        th_q <= ld_data;
    end
    assign theta[i] = th_q;

    for (genvar j = 0; j < N_IN; j++) begin : g_col
      fx_t w_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          w_q <= '0;
        else if (w_upd)
          w_q <= w_q - w_dec[i][j];
        else if (ld_en && !ld_bias && 32'(ld_row) == i && 32'(ld_col) == j)
          w_q <= ld_data;
      end
      assign w[i][j] = w_q;
    end
  end

endmodule
