// tb_fp_module: two 4-input neurons, one sigmoid and one linear, fed new
// random inputs, coefficients and bias every clock. y_out is checked two
// clocks and z_out five clocks after the inputs, against sum_j w_j z_j + theta
// computed with the bias presented one clock after the products.
module tb_fp_module;
  import tb_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0;
  nn_pkg::fx_t z_in [N], w_row [N];
  int theta;
  int y_s, z_s, y_l, z_l;
  int hz [int][N], hw [int][N], ht [int];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_module #(.N_IN(N), .ACT_SIGMOID(1'b1)) dut_s (.clk, .z_in, .w_row, .theta, .y_out(y_s), .z_out(z_s));
  fp_module #(.N_IN(N), .ACT_SIGMOID(1'b0)) dut_l (.clk, .z_in, .w_row, .theta, .y_out(y_l), .z_out(z_l));

  function automatic int ref_y(int n);
    int s;
    s = ht[n+1];
    for (int j = 0; j < N; j++) s += rmul(hw[n][j], hz[n][j]);
    return s;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        checks += 2;
        if (y_s != ref_y(k-2)) failures++;
        if (y_l != ref_y(k-2)) failures++;
      end
      if (k >= 5) begin
        checks += 2;
        if (z_s != rsig(ref_y(k-5))) failures++;
        if (z_l != ref_y(k-5)) failures++;
      end
      for (int j = 0; j < N; j++) begin
        z_in[j] = rnd_fx(2.0); w_row[j] = rnd_fx(2.0);
        hz[k][j] = z_in[j]; hw[k][j] = w_row[j];
      end
      theta = rnd_fx(1.0);
      ht[k] = theta;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
