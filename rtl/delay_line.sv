// delay_line: fixed-length shift register that holds a value for DEPTH clock
// cycles.
//
// The back-propagation pass needs values the forward pass produced several
// clocks earlier for the same example (the layer-2 coefficients and hidden
// activations it used, the input vector). Because a new example enters every
// clock, those values cannot simply be kept in one register: each one travels
// alongside its example in a chain of DEPTH registers. dout equals the din
// presented DEPTH clocks earlier. There is no reset: the contents only matter
// once a valid example has passed through, which the control logic tracks.
// That such delay elements exist follows the architecture; building them as
// plain shift registers is this design's choice.
module delay_line #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 7
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    stage[0] <= din;
    for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
  end

  assign dout = stage[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("delay_line: DEPTH must be at least 1");

endmodule
