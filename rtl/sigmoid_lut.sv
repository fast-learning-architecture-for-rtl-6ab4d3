// sigmoid_lut: f(x) = e^x / (1 + e^x) in three clock cycles, by table look-up
// with linear interpolation.
//
// The input range [-8, 8) is cut into 2^SEG_BITS equal segments (64 segments
// of width 0.25 by default). A table holds f at the 65 segment boundaries,
// T[k] = round(f(-8 + 16*k/2^SEG_BITS) * 2^FX_FRAC), computed at elaboration.
// Inputs below -8 give T[0], inputs at or above 8 give the last segment's end
// value minus at most one step. Worst-case error is about 8e-4.
//
// Timing: three register stages, so y belongs to the x presented three
// clocks earlier.
//   stage 1: clamp, split into segment index and offset
//   stage 2: read boundary value and slope of the segment
//   stage 3: base + slope * offset
// That the sigmoid is a table look-up taking three clock periods follows the
// architecture; the segment count and the interpolation are this design's
// choice.
module sigmoid_lut
  import nn_pkg::*;
#(
  parameter int SEG_BITS = 6
) (
  input  logic clk,
  input  fx_t  x,
  output fx_t  y
);

  localparam int NSEG     = 1 << SEG_BITS;
  // log2 of the segment width in LSBs: the 16-wide range spans 2^(FX_FRAC+4)
  localparam int OFF_BITS = FX_FRAC + 4 - SEG_BITS;

  typedef fx_t table_t [NSEG+1];

  function automatic table_t make_table();
    table_t t;
    real xr, fr;
    for (int k = 0; k <= NSEG; k++) begin
      xr   = -8.0 + 16.0 * real'(k) / real'(NSEG);
      fr   = 1.0 / (1.0 + $exp(-xr));
      t[k] = fx_t'($rtoi(fr * real'(longint'(1) << FX_FRAC) + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  // The clamp limits, in the input's own format.
  localparam fx_t X_MIN = -(fx_t'(8) <<< FX_FRAC);
  localparam fx_t X_MAX = (fx_t'(8) <<< FX_FRAC) - 1;

  // stage 1
  logic [SEG_BITS-1:0] s1_idx;
  logic [OFF_BITS-1:0] s1_off;
  // stage 2
  fx_t                 s2_base;
  fx_t                 s2_slope;
  logic [OFF_BITS-1:0] s2_off;

  fx_t                 x_clamped;
  fx_t                 x_shifted;

  always_comb begin
    if (x < X_MIN)      x_clamped = X_MIN;
    else if (x > X_MAX) x_clamped = X_MAX;
    else                x_clamped = x;
    x_shifted = x_clamped - X_MIN;  // 0 .. 16*2^FX_FRAC - 1
  end

  // Only the low FX_FRAC+4 bits of x_shifted can be non-zero after the clamp.
  logic unused_hi;
  always_comb unused_hi = ^x_shifted[FX_W-1:FX_FRAC+4];

  always_ff @(posedge clk) begin
    s1_idx <= x_shifted[OFF_BITS +: SEG_BITS];
    s1_off <= x_shifted[OFF_BITS-1:0];
  end

  always_ff @(posedge clk) begin
    s2_base  <= TABLE[{1'b0, s1_idx}];
    s2_slope <= TABLE[{1'b0, s1_idx} + 1'b1] - TABLE[{1'b0, s1_idx}];
    s2_off   <= s1_off;
  end

  logic signed [FX_W+OFF_BITS:0] interp;
  always_comb interp = s2_slope * $signed({1'b0, s2_off});

  always_ff @(posedge clk) begin
    y <= s2_base + fx_t'(interp >>> OFF_BITS);
  end

endmodule
