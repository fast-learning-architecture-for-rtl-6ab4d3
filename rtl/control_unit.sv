// control_unit: schedules examples through the 17-clock training pipeline and
// enables every parameter write.
//
// While train_en is high and the z-buffer holds an example, one example is
// issued per clock (z_pop). A 17-bit valid shift register follows each issued
// example through the pipeline; stage k of it is high during the example's
// pipeline clock k (clock 1 = the clock it leaves the z-buffer). From it come
//   t_pop       clock 11  desired values leave the t-buffer for the cost unit
//   out_valid   clock 11  network output visible
//   theta2_upd  clock 13  layer-2 biases adapted
//   cost_valid  clock 13  cost visible
//   w2_upd      clock 14  layer-2 coefficients adapted
//   theta1_upd  clock 16  layer-1 biases adapted
//   w1_upd      clock 17  layer-1 coefficients adapted (example finished)
// Since a new example enters before the earlier ones have adapted the
// coefficients, each example's forward pass sees coefficients that lack the
// adaptations of up to 16 earlier examples (delayed adaptation).
// A host load (ld_en) is accepted only while no example is in the pipeline
// (busy low); otherwise ld_rejected pulses and nothing is written.
// n_trained counts finished examples. Issuing one example per clock and the
// write schedule follow the architecture; the valid shift register, the load
// rule and the counter are this design's choices.
module control_unit
  import nn_pkg::*;
#(
  parameter int DEPTH = PIPE_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        train_en,
  input  logic        z_empty,
  input  logic        t_empty,
  input  logic        ld_en,
  output logic        z_pop,
  output logic        t_pop,
  output logic        out_valid,
  output logic        cost_valid,
  output logic        theta2_upd,
  output logic        w2_upd,
  output logic        theta1_upd,
  output logic        w1_upd,
  output logic        ld_we,
  output logic        ld_rejected,
  output logic        busy,
  output logic [31:0] n_trained
);

  // stage_v[k] : an example is in pipeline clock k (k = 2 .. DEPTH)
  logic [DEPTH:2] stage_v;

  assign z_pop = train_en && !z_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_v   <= '0;
      n_trained <= '0;
    end else begin
      stage_v <= {stage_v[DEPTH-1:2], z_pop};
      if (w1_upd) n_trained <= n_trained + 1;
    end
  end

  assign t_pop      = stage_v[CYC_T_READ];
  assign out_valid  = stage_v[CYC_OUT];
  assign cost_valid = stage_v[CYC_COST];
  assign theta2_upd = stage_v[CYC_THETA2_UPD];
  assign w2_upd     = stage_v[CYC_W2_UPD];
  assign theta1_upd = stage_v[CYC_THETA1_UPD];
  assign w1_upd     = stage_v[CYC_W1_UPD];

  assign busy        = z_pop || (stage_v != '0);
  assign ld_we       = ld_en && !busy;
  assign ld_rejected = ld_en && busy;

  // The t-buffer receives its vector together with the z-buffer, so it can
  // never be empty when an example reaches the cost unit.
  always_ff @(posedge clk) begin
    if (rst_n && t_pop)
      assert (!t_empty) else $error("control_unit: t-buffer empty when an example reached the cost unit");
  end

  initial assert (DEPTH == PIPE_DEPTH) else $error("control_unit: DEPTH must be %0d", PIPE_DEPTH);

endmodule
