// tb_cost_unit: random outputs and targets every clock into a linear-output
// and a sigmoid-output cost unit (4 outputs). Two clocks later L_j must be
// (z - t) or (z - t) z (1 - z), and the cost 1/2 sum (z - t)^2.
module tb_cost_unit;
  import tb_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0;
  nn_pkg::fx_t zo [N], t [N], l_lin [N], l_sig [N];
  int c_lin, c_sig;
  int hz [int][N], ht [int][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cost_unit #(.N(N), .OUT_SIGMOID(1'b0)) dut_l (.clk, .z_out(zo), .t, .l_err(l_lin), .cost(c_lin));
  cost_unit #(.N(N), .OUT_SIGMOID(1'b1)) dut_s (.clk, .z_out(zo), .t, .l_err(l_sig), .cost(c_sig));

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
        int e, jd;
        e = 0;
        for (int j = 0; j < N; j++) begin
          jd = hz[k-2][j] - ht[k-2][j];
          e += rmul(jd, jd);
          checks += 2;
          if (l_lin[j] != jd) failures++;
          if (l_sig[j] != rmul(rmul(jd, hz[k-2][j]), ONE - hz[k-2][j])) failures++;
        end
        checks += 2;
        if (c_lin != (e >>> 1) || c_sig != (e >>> 1)) failures++;
        if (c_lin != (e >>> 1)) failures++;
      end
      for (int j = 0; j < N; j++) begin
        zo[j] = rnd_fx(4.0); t[j] = rnd_fx(4.0);
        hz[k][j] = zo[j]; ht[k][j] = t[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
