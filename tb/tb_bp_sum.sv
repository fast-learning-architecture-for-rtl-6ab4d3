// tb_bp_sum: random error terms and coefficients every clock; two clocks
// later o_sum must be sum_k L_k w_k.
module tb_bp_sum;
  import tb_ref_pkg::*;
  localparam int N = 5;
  logic clk = 0;
  nn_pkg::fx_t l_err [N], w_col [N];
  int o_sum;
  int hl [int][N], hw [int][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bp_sum #(.N_OUT(N)) dut (.clk, .l_err, .w_col, .o_sum);

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
        int s;
        s = 0;
        for (int j = 0; j < N; j++) s += rmul(hl[k-2][j], hw[k-2][j]);
        checks++;
        if (o_sum != s) failures++;
      end
      for (int j = 0; j < N; j++) begin
        l_err[j] = rnd_fx(4.0); w_col[j] = rnd_fx(1.0);
        hl[k][j] = l_err[j]; hw[k][j] = w_col[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
