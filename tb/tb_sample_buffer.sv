// tb_sample_buffer: random writes and reads of 4-word vectors into an 8-deep
// buffer, compared with a queue model: head vector, full, empty and count.
// The buffer is driven to full and to empty several times.
module tb_sample_buffer;
  import nn_pkg::*;
  localparam int N = 4, D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  fx_t wr_data [N], rd_data [N];
  logic [$clog2(D+1)-1:0] count;
  fx_t q [$][N];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  always #5 clk = ~clk;

  sample_buffer #(.N(N), .DEPTH(D)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (count != ($bits(count))'(q.size()) || full != (q.size() == D) || empty != (q.size() == 0))
        failures++;
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) failures++;
      end
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      // phases: fill-biased, drain-biased
      wr_en = ((k / 100) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_en = ((k / 100) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (full) wr_en = 0;
      if (empty) rd_en = 0;
      foreach (wr_data[j]) wr_data[j] = fx_t'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
