// nn_pkg: shared number format, network sizes and fixed-point helpers for the
// pipelined back-propagation trainer.
//
// All network quantities (inputs, activations, targets, errors, coefficients,
// biases) use one signed two's-complement fixed-point format, FX_W bits with
// FX_FRAC fraction bits (Q12.20 by default: range +/-2048, step ~1e-6). The
// adaptation step size delta is an unsigned number with DELTA_FRAC fraction
// bits, so the step sizes 1e-4 and 5e-4 used for the DFT workload are
// represented as 1678 and 8389. The number format is this design's choice;
// the source architecture does not fix one.
//
// Default network sizes follow the DFT workload: N_FFT = 16 complex points,
// so 2*N_FFT = 32 real inputs and 32 real outputs. The hidden layer size is
// not given for that workload and is set here to 32.
package nn_pkg;

  localparam int FX_W       = 32;
  localparam int FX_FRAC    = 20;
  localparam int DELTA_W    = 16;
  localparam int DELTA_FRAC = 24;

  localparam int N_FFT   = 16;
  localparam int N0_DEF  = 2 * N_FFT;  // input layer size
  localparam int N1_DEF  = 32;         // hidden layer size (own choice)
  localparam int N2_DEF  = 2 * N_FFT;  // output layer size

  // Pipeline schedule: the cycle (1 = cycle in which the example leaves the
  // z-buffer) during which each step happens. Values are registered at the
  // end of the cycle named.
  localparam int CYC_THETA2_UPD = 13;
  localparam int CYC_W2_UPD     = 14;
  localparam int CYC_THETA1_UPD = 16;
  localparam int CYC_W1_UPD     = 17;
  localparam int CYC_T_READ     = 11;
  localparam int CYC_OUT        = 11;  // network output visible
  localparam int CYC_COST       = 13;  // cost visible
  localparam int PIPE_DEPTH     = 17;  // T = 8q + 1 for q = 2

  typedef logic signed [FX_W-1:0]  fx_t;
  typedef logic [DELTA_W-1:0]      delta_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_FRAC;

  // Fixed-point product, truncated toward minus infinity, wrapped to FX_W.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_FRAC);
  endfunction

  // delta * x, truncated toward minus infinity.
  function automatic fx_t fx_scale(fx_t x, delta_t d);
    logic signed [FX_W+DELTA_W:0] p;
    p = x * $signed({1'b0, d});
    return fx_t'(p >>> DELTA_FRAC);
  endfunction

endpackage
