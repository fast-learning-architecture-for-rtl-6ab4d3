// tb_sigmoid_lut: random inputs over [-10, 10] every clock; each output is
// compared three clocks later with the reference table interpolation (exact)
// and with the real sigmoid (within 1e-3).
module tb_sigmoid_lut;
  import tb_ref_pkg::*;
  logic clk = 0;
  int x, y;
  int hist [int];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sigmoid_lut dut (.clk, .x, .y);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k >= 3) begin
        real fr;
        checks++;
        if (y !== rsig(hist[k-3])) begin
          failures++;
          if (failures < 10) $display("sigmoid x=%0d got %0d want %0d", hist[k-3], y, rsig(hist[k-3]));
        end
        fr = 1.0 / (1.0 + $exp(-from_fx(hist[k-3])));
        checks++;
        if ((from_fx(y) - fr > 1e-3) || (fr - from_fx(y) > 1e-3)) failures++;
      end
      x = (k % 7 == 0) ? (k % 14 == 0 ? 12 << 20 : -(12 << 20)) : rnd_fx(10.0);
      hist[k] = x;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
