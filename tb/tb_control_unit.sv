// tb_control_unit: random train_en and buffer occupancy. For every example
// issued in clock n the testbench expects t_pop and out_valid in clock n+10,
// theta2_upd and cost_valid in n+12, w2_upd in n+13, theta1_upd in n+15 and
// w1_upd in n+16, a host load only while no example is in flight, and
// n_trained counting finished examples.
module tb_control_unit;
  logic clk = 0, rst_n = 0, train_en = 0, z_empty = 1, t_empty = 1, ld_en = 0;
  logic z_pop, t_pop, out_valid, cost_valid, theta2_upd, w2_upd, theta1_upd, w1_upd;
  logic ld_we, ld_rejected, busy;
  logic [31:0] n_trained;
  bit issued [int];
  int checks = 0, failures = 0, n_done = 0, n_rej = 0, n_ld = 0;
  always #5 clk = ~clk;

  control_unit dut (.*);

  function automatic bit was(int n);
    return (n >= 0) && issued.exists(n) && issued[n];
  endfunction

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
      bit inflight;
      @(negedge clk);
      train_en = ((k / 150) % 3 != 2) && ($urandom % 8 != 0);
      z_empty  = ($urandom % 5 == 0);
      t_empty  = 0;
      ld_en    = ($urandom % 6 == 0);
      #1;
      issued[k] = train_en && !z_empty;
      inflight = 0;
      for (int d = 0; d <= 16; d++) if (was(k - d)) inflight = 1;
      checks += 10;
      if (z_pop != issued[k]) failures++;
      if (t_pop != was(k - 10) || out_valid != was(k - 10)) failures++;
      if (theta2_upd != was(k - 12) || cost_valid != was(k - 12)) failures++;
      if (w2_upd != was(k - 13)) failures++;
      if (theta1_upd != was(k - 15)) failures++;
      if (w1_upd != was(k - 16)) failures++;
      if (busy != inflight) failures++;
      if (ld_we != (ld_en && !inflight)) failures++;
      if (ld_rejected != (ld_en && inflight)) failures++;
      if (n_trained != 32'(n_done)) failures++;
      if (was(k - 16)) n_done++;
      if (ld_we) n_ld++;
      if (ld_rejected) n_rej++;
    end
    checks++;
    if (n_ld == 0 || n_rej == 0 || n_done == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
