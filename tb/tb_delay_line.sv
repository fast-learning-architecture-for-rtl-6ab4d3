// tb_delay_line: random 16-bit words, dout must equal the word presented
// DEPTH = 5 clocks earlier.
module tb_delay_line;
  logic clk = 0;
  logic [15:0] din, dout;
  logic [15:0] hist [int];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delay_line #(.WIDTH(16), .DEPTH(5)) dut (.clk, .din, .dout);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      if (k >= 5) begin
        checks++;
        if (dout !== hist[k-5]) failures++;
      end
      din = 16'($urandom);
      hist[k] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
