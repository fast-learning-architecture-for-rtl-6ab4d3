// tb_param_regs: loads every coefficient and bias of a 3x4 layer, reads them
// back, then applies random bias and coefficient decrements and checks the
// result after every clock. Loads during an update must not take effect.
module tb_param_regs;
  import nn_pkg::*;
  localparam int NO = 3, NI = 4;
  logic clk = 0, rst_n = 0, ld_en = 0, ld_bias = 0, theta_upd = 0, w_upd = 0;
  logic [7:0] ld_row = 0, ld_col = 0;
  fx_t ld_data = 0;
  fx_t theta_dec [NO], w_dec [NO][NI], w [NO][NI], theta [NO];
  int mw [NO][NI], mt [NO];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  param_regs #(.N_OUT(NO), .N_IN(NI)) dut (.*);

  task automatic compare();
    for (int i = 0; i < NO; i++) begin
      checks++;
      if (theta[i] != mt[i]) failures++;
      for (int j = 0; j < NI; j++) begin
        checks++;
        if (w[i][j] != mw[i][j]) failures++;
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (theta_dec[i]) theta_dec[i] = 0;
    foreach (w_dec[i, j]) w_dec[i][j] = 0;
    foreach (mw[i, j]) mw[i][j] = 0;
    foreach (mt[i]) mt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < NO; i++) begin
      for (int j = 0; j <= NI; j++) begin
        ld_en = 1; ld_bias = (j == NI); ld_row = 8'(i); ld_col = 8'(j);
        ld_data = fx_t'($urandom);
        if (j == NI) mt[i] = ld_data; else mw[i][j] = ld_data;
        @(negedge clk);
      end
    end
    ld_en = 0;
    compare();
    for (int k = 0; k < 200; k++) begin
      theta_upd = $urandom % 2;
      w_upd = $urandom % 2;
      ld_en = (k % 5 == 0); ld_bias = 0; ld_row = 0; ld_col = 0; ld_data = 32'h1234;
      foreach (theta_dec[i]) theta_dec[i] = fx_t'($urandom % 1000) - 500;
      foreach (w_dec[i, j]) w_dec[i][j] = fx_t'($urandom % 1000) - 500;
      if (theta_upd) foreach (mt[i]) mt[i] -= theta_dec[i];
      if (w_upd) foreach (mw[i, j]) mw[i][j] -= w_dec[i][j];
      else if (ld_en) mw[0][0] = 32'h1234;
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
