// tb_bp_deriv: a new activation C every clock and a new sum O every clock.
// The output registered in pipeline clock 15 must be C(1 - C) O, with C taken
// from clock 6 and O from clock 15 of the same example, i.e. p_err seen at
// iteration k is built from C of iteration k-10 and O of iteration k-1.
module tb_bp_deriv;
  import tb_ref_pkg::*;
  logic clk = 0;
  int c_act, o_sum, p_err;
  int hc [int], ho [int];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bp_deriv dut (.clk, .c_act, .o_sum, .p_err);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      if (k >= 10) begin
        checks++;
        if (p_err != rmul(rmul(hc[k-10], ONE - hc[k-10]), ho[k-1])) failures++;
      end
      c_act = rnd_fx(0.5) + (ONE / 2);
      o_sum = rnd_fx(3.0);
      hc[k] = c_act; ho[k] = o_sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
