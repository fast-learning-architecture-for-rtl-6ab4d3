// nn_train_top: on-line back-propagation training of a two-layer fully
// connected network (N0 inputs, N1 sigmoid hidden neurons, N2 output neurons),
// pipelined so that a new training example enters every clock.
//
// One example runs through 17 pipeline clocks (8q + 1 with q = 2 layers):
//   1      A = w1 z0                products        (fp_module, layer 1)
//   2      B = sum A + theta1                       (fp_module)
//   3-5    C = f(B)                 sigmoid look-up
//   6      D = w2 C,  F = 1 - C                     (fp_module layer 2, bp_deriv)
//   7      G = sum D + theta2, H = C F
//   8-10   I = f(G) (or I = G for a linear output layer)
//   11     J = I - t, K = 1 - I                     (cost_unit)
//   12     L = J I K (or L = J)
//   13     M = L w2, N = L C, theta2 -= delta L     (bp_sum, adapt_module)
//   14     O = sum M, w2 -= delta N
//   15     P = H O                                  (bp_deriv)
//   16     Q = P z0, theta1 -= delta P              (adapt_module)
//   17     w1 -= delta Q
// Values an example needs again later (its w2 and C for clock 13, its z0 for
// clock 16) travel with it in delay lines. Because up to 16 younger examples
// have already started, every forward pass uses coefficients that lack the
// adaptations of the examples still in flight: the adaptation is delayed by up
// to 16 examples, which is the price of a throughput of one example per clock.
//
// Interface
//   delta               adaptation step size, DELTA_FRAC fraction bits; keep
//                       constant while examples are in flight
//   smp_wr_en/smp_z/smp_t/smp_full
//                       write one example (input vector and desired output
//                       vector) into the z- and t-buffers; not while smp_full
//   train_en            while high, one buffered example is issued per clock
//   ld_en/ld_layer/ld_bias/ld_row/ld_col/ld_data
//                       write one coefficient (ld_bias = 0: w[row][col]) or
//                       bias (ld_bias = 1: theta[row]) of layer ld_layer + 1;
//                       taken only when busy is low, else ld_rejected pulses
//   rd_layer/rd_bias/rd_row/rd_col -> rd_data
//                       combinational read of any coefficient or bias
//   out_valid/out_z     network output of an example (pipeline clock 11)
//   cost_valid/cost     its cost 1/2 sum (z - t)^2 (pipeline clock 13)
//   busy, n_trained     examples in flight; examples finished
// The z-buffer holds BUF_DEPTH examples, the t-buffer BUF_DEPTH + 11 targets
// (see below).
// Pipeline structure and schedule follow the architecture. The output layer
// is linear by default (OUT_SIGMOID = 0), as in the DFT learning workload; the
// hidden layer size, the number format, the buffer depth and the host ports
// are this design's choices.
module nn_train_top
  import nn_pkg::*;
#(
  parameter int N0          = N0_DEF,
  parameter int N1          = N1_DEF,
  parameter int N2          = N2_DEF,
  parameter bit OUT_SIGMOID = 1'b0,
  parameter int BUF_DEPTH   = 32,
  parameter int IDX_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  delta_t           delta,
  // training examples
  input  logic             smp_wr_en,
  input  fx_t              smp_z [N0],
  input  fx_t              smp_t [N2],
  output logic             smp_full,
  input  logic             train_en,
  // coefficient load and read-back
  input  logic             ld_en,
  input  logic             ld_layer,
  input  logic             ld_bias,
  input  logic [IDX_W-1:0] ld_row,
  input  logic [IDX_W-1:0] ld_col,
  input  fx_t              ld_data,
  output logic             ld_rejected,
  input  logic             rd_layer,
  input  logic             rd_bias,
  input  logic [IDX_W-1:0] rd_row,
  input  logic [IDX_W-1:0] rd_col,
  output fx_t              rd_data,
  // results
  output logic             out_valid,
  output fx_t              out_z [N2],
  output logic             cost_valid,
  output fx_t              cost,
  output logic             busy,
  output logic [31:0]      n_trained
);

  localparam int W2_HOLD = 7;   // w2 and C: read in clock 6, used in clock 13
  localparam int Z0_HOLD = 15;  // z0: read in clock 1, used in clock 16

  // ---------------------------------------------------------------- control
  logic z_pop, t_pop, z_empty, t_empty, z_full, t_full;
  logic theta2_upd, w2_upd, theta1_upd, w1_upd, ld_we;

  control_unit u_ctrl (
    .clk, .rst_n, .train_en, .z_empty, .t_empty, .ld_en,
    .z_pop, .t_pop, .out_valid, .cost_valid,
    .theta2_upd, .w2_upd, .theta1_upd, .w1_upd,
    .ld_we, .ld_rejected, .busy, .n_trained
  );

  // ---------------------------------------------------------------- buffers
  fx_t z0 [N0];
  fx_t tv [N2];
  logic smp_we;
  localparam int T_DEPTH = BUF_DEPTH + CYC_T_READ;
  logic [$clog2(BUF_DEPTH+1)-1:0] z_count;
  logic [$clog2(T_DEPTH+1)-1:0]   t_count;

  assign smp_full = z_full || t_full;
  assign smp_we   = smp_wr_en && !smp_full;

  sample_buffer #(.N(N0), .DEPTH(BUF_DEPTH)) u_zbuf (
    .clk, .rst_n, .wr_en(smp_we), .wr_data(smp_z), .rd_en(z_pop), .rd_data(z0),
    .full(z_full), .empty(z_empty), .count(z_count)
  );

  // The t-buffer also holds the targets of the up to CYC_T_READ examples that
  // have left the z-buffer but not yet reached the cost unit, so it is that
  // much deeper; otherwise it would fill first and starve the pipeline.
  sample_buffer #(.N(N2), .DEPTH(T_DEPTH)) u_tbuf (
    .clk, .rst_n, .wr_en(smp_we), .wr_data(smp_t), .rd_en(t_pop), .rd_data(tv),
    .full(t_full), .empty(t_empty), .count(t_count)
  );

  // ---------------------------------------------------------------- parameters
  fx_t w1 [N1][N0];
  fx_t th1 [N1];
  fx_t w2 [N2][N1];
  fx_t th2 [N2];
  fx_t w1_dec [N1][N0];
  fx_t th1_dec [N1];
  fx_t w2_dec [N2][N1];
  fx_t th2_dec [N2];

  param_regs #(.N_OUT(N1), .N_IN(N0), .IDX_W(IDX_W)) u_regs1 (
    .clk, .rst_n, .ld_en(ld_we && !ld_layer), .ld_bias, .ld_row, .ld_col, .ld_data,
    .theta_upd(theta1_upd), .theta_dec(th1_dec), .w_upd(w1_upd), .w_dec(w1_dec),
    .w(w1), .theta(th1)
  );

  param_regs #(.N_OUT(N2), .N_IN(N1), .IDX_W(IDX_W)) u_regs2 (
    .clk, .rst_n, .ld_en(ld_we && ld_layer), .ld_bias, .ld_row, .ld_col, .ld_data,
    .theta_upd(theta2_upd), .theta_dec(th2_dec), .w_upd(w2_upd), .w_dec(w2_dec),
    .w(w2), .theta(th2)
  );

  always_comb begin
    rd_data = '0;
    if (!rd_layer) begin
      if (rd_bias) begin
        if (32'(rd_row) < N1) rd_data = th1[rd_row];
      end else if (32'(rd_row) < N1 && 32'(rd_col) < N0) rd_data = w1[rd_row][rd_col];
    end else begin
      if (rd_bias) begin
        if (32'(rd_row) < N2) rd_data = th2[rd_row];
      end else if (32'(rd_row) < N2 && 32'(rd_col) < N1) rd_data = w2[rd_row][rd_col];
    end
  end

  // ---------------------------------------------------------------- forward
  fx_t y1 [N1];
  fx_t c1 [N1];   // hidden activations C (clock 6)
  fx_t y2 [N2];
  fx_t i2 [N2];   // network output I (clock 11)

  for (genvar i = 0; i < N1; i++) begin : g_fp1
    fp_module #(.N_IN(N0), .ACT_SIGMOID(1'b1)) u_fp (
      .clk, .z_in(z0), .w_row(w1[i]), .theta(th1[i]), .y_out(y1[i]), .z_out(c1[i])
    );
  end

  for (genvar i = 0; i < N2; i++) begin : g_fp2
    fp_module #(.N_IN(N1), .ACT_SIGMOID(OUT_SIGMOID)) u_fp (
      .clk, .z_in(c1), .w_row(w2[i]), .theta(th2[i]), .y_out(y2[i]), .z_out(i2[i])
    );
  end

  assign out_z = i2;

  // ---------------------------------------------------------------- cost
  fx_t l_err [N2];   // clock 13

  cost_unit #(.N(N2), .OUT_SIGMOID(OUT_SIGMOID)) u_cost (
    .clk, .z_out(i2), .t(tv), .l_err, .cost
  );

  // ---------------------------------------------------------------- delays
  logic [N2*N1*FX_W-1:0] w2_flat, w2_late_flat;
  logic [N1*FX_W-1:0]    c1_flat, c1_late_flat;
  logic [N0*FX_W-1:0]    z0_flat, z0_late_flat;
  fx_t w2_late [N2][N1];
  fx_t c1_late [N1];
  fx_t z0_late [N0];

  for (genvar k = 0; k < N2; k++) begin : g_w2_pack
    for (genvar j = 0; j < N1; j++) begin : g_col
      assign w2_flat[(k*N1+j)*FX_W +: FX_W] = w2[k][j];
      assign w2_late[k][j] = w2_late_flat[(k*N1+j)*FX_W +: FX_W];
    end
  end
  for (genvar j = 0; j < N1; j++) begin : g_c1_pack
    assign c1_flat[j*FX_W +: FX_W] = c1[j];
    assign c1_late[j] = c1_late_flat[j*FX_W +: FX_W];
  end
  for (genvar j = 0; j < N0; j++) begin : g_z0_pack
    assign z0_flat[j*FX_W +: FX_W] = z0[j];
    assign z0_late[j] = z0_late_flat[j*FX_W +: FX_W];
  end

  delay_line #(.WIDTH(N2*N1*FX_W), .DEPTH(W2_HOLD)) u_dly_w2 (.clk, .din(w2_flat), .dout(w2_late_flat));
  delay_line #(.WIDTH(N1*FX_W),    .DEPTH(W2_HOLD)) u_dly_c1 (.clk, .din(c1_flat), .dout(c1_late_flat));
  delay_line #(.WIDTH(N0*FX_W),    .DEPTH(Z0_HOLD)) u_dly_z0 (.clk, .din(z0_flat), .dout(z0_late_flat));

  // ---------------------------------------------------------------- backward
  fx_t o_sum [N1];   // clock 15
  fx_t p_err [N1];   // clock 16

  for (genvar j = 0; j < N1; j++) begin : g_bp
    fx_t w_col [N2];
    for (genvar k = 0; k < N2; k++) begin : g_col
      assign w_col[k] = w2_late[k][j];
    end
    bp_sum #(.N_OUT(N2)) u_bp1 (.clk, .l_err, .w_col, .o_sum(o_sum[j]));
    bp_deriv u_bp2 (.clk, .c_act(c1[j]), .o_sum(o_sum[j]), .p_err(p_err[j]));
  end

  // ---------------------------------------------------------------- adaptation
  adapt_module #(.N_OUT(N2), .N_IN(N1)) u_adapt2 (
    .clk, .delta, .err(l_err), .act(c1_late), .theta_dec(th2_dec), .w_dec(w2_dec)
  );

  adapt_module #(.N_OUT(N1), .N_IN(N0)) u_adapt1 (
    .clk, .delta, .err(p_err), .act(z0_late), .theta_dec(th1_dec), .w_dec(w1_dec)
  );

endmodule
