// tb_adapt_module: random error terms, activations and step size every
// clock. theta_dec must be delta * err at once; w_dec one clock later must be
// delta * (err_i * act_j) of the previous clock's inputs (with that clock's
// delta held constant across both clocks here).
module tb_adapt_module;
  import tb_ref_pkg::*;
  localparam int NO = 3, NI = 4;
  logic clk = 0;
  logic [15:0] delta;
  nn_pkg::fx_t err [NO], act [NI], theta_dec [NO], w_dec [NO][NI];
  int he [int][NO], ha [int][NI];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  adapt_module #(.N_OUT(NO), .N_IN(NI)) dut (.clk, .delta, .err, .act, .theta_dec, .w_dec);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delta = 16'd8389;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      if (k >= 1) begin
        for (int i = 0; i < NO; i++)
          for (int j = 0; j < NI; j++) begin
            checks++;
            if (w_dec[i][j] != rscale(rmul(he[k-1][i], ha[k-1][j]), int'(delta))) failures++;
          end
      end
      if (k % 100 == 0) delta = 16'($urandom);
      for (int i = 0; i < NO; i++) begin err[i] = rnd_fx(8.0); he[k][i] = err[i]; end
      for (int j = 0; j < NI; j++) begin act[j] = rnd_fx(4.0); ha[k][j] = act[j]; end
      #1;
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (theta_dec[i] != rscale(err[i], int'(delta))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
