// tb_nn_train_sigout: end-to-end test of the pipelined trainer with a sigmoid
// output layer at reduced size (4 inputs, 5 hidden, 3 outputs, 8-entry buffers).
//
// The testbench loads random initial coefficients through the host port,
// streams 600 training examples into the buffers and trains them, then reads
// every coefficient back. Examples are uniform random vectors.
// A cycle-level reference model, written from the schedule alone, follows
// every example through its 17 pipeline clocks: the forward pass reads w1 in
// its clock 1, theta1 in clock 2, w2 in clock 6 and theta2 in clock 7; theta2
// is adapted at the end of clock 13, w2 of clock 14, theta1 of clock 16 and w1
// of clock 17; the backward pass uses the w2 the example itself read. The
// model checks every network output (clock 11), every cost (clock 13), the
// buffer-full flag, busy and n_trained each clock, and all coefficients at the
// end. It also counts how often each mechanism occurred: buffer full,
// pipeline bubble (buffer empty while training), training paused with
// examples waiting, all 17 stages occupied, forward pass with pending
// adaptations (delayed adaptation), load refused while busy, and pipeline
// drain; one that never happened counts as a failure.
module tb_nn_train_sigout;
  import nn_pkg::fx_t;
  import tb_ref_pkg::*;

  localparam int P0 = 4, P1 = 5, P2 = 3, D = 8;
  localparam bit OUT_SIG = 1'b1;
  localparam int NEX = 600;
  localparam int DELTA = 8389;
  localparam int MAXCYC = 20000;

  logic clk = 0, rst_n = 0;
  logic [15:0] delta = 16'(DELTA);
  logic smp_wr_en = 0, train_en = 0, smp_full;
  fx_t smp_z [P0], smp_t [P2];
  logic ld_en = 0, ld_layer = 0, ld_bias = 0, ld_rejected;
  logic [7:0] ld_row = 0, ld_col = 0, rd_row = 0, rd_col = 0;
  fx_t ld_data = 0, rd_data;
  logic rd_layer = 0, rd_bias = 0;
  logic out_valid, cost_valid, busy;
  fx_t out_z [P2], cost;
  logic [31:0] n_trained;

  always #5 clk = ~clk;

  nn_train_top #(.N0(P0), .N1(P1), .N2(P2), .OUT_SIGMOID(1'b1), .BUF_DEPTH(D)) dut (.*);

  // ------------------------------------------------------------ model state
  int mw1 [P1][P0], mt1 [P1], mw2 [P2][P1], mt2 [P2];
  int ex_z [NEX][P0], ex_t [NEX][P2];
  int st_a [NEX][P1], st_c [NEX][P1], st_h [NEX][P1], st_d [NEX][P2];
  int st_i [NEX][P2], st_l [NEX][P2], st_e [NEX], st_p [NEX][P1];
  int w2s [int][P2][P1];
  int nq [int][P2][P1], qq [int][P1][P0];
  int start [NEX];
  int zq [$], tq [$], inflight [$];
  int n_written = 0, n_issued = 0, n_done = 0;
  int checks = 0, failures = 0;
  int c_full = 0, c_bubble = 0, c_pause = 0, c_allstages = 0, c_delayed = 0, c_reject = 0, c_drain = 0;
  real e_first = 0.0, e_last = 0.0, p_first = 0.0, p_last = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mismatch: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic make_examples();
    for (int e = 0; e < NEX; e++) begin
      for (int j = 0; j < P0; j++) ex_z[e][j] = rnd_fx(1.0);
      for (int j = 0; j < P2; j++) ex_t[e][j] = rnd_fx(1.0);
    end
  endtask

  // model actions of clock k: first every read, then every write
  task automatic model_clock(int k);
    for (int n = 0; n < inflight.size(); n++) begin
      int e, s;
      e = inflight[n];
      s = k - start[e];
      if (s == 0) begin
        for (int i = 0; i < P1; i++) begin
          st_a[e][i] = 0;
          for (int j = 0; j < P0; j++) st_a[e][i] += rmul(mw1[i][j], ex_z[e][j]);
        end
      end else if (s == 1) begin
        for (int i = 0; i < P1; i++) begin
          st_c[e][i] = rsig(st_a[e][i] + mt1[i]);
          st_h[e][i] = rmul(st_c[e][i], ONE - st_c[e][i]);
        end
      end else if (s == 5) begin
        for (int i = 0; i < P2; i++) begin
          st_d[e][i] = 0;
          for (int j = 0; j < P1; j++) begin
            st_d[e][i] += rmul(mw2[i][j], st_c[e][j]);
            w2s[e][i][j] = mw2[i][j];
          end
        end
      end else if (s == 6) begin
        for (int i = 0; i < P2; i++) begin
          st_i[e][i] = st_d[e][i] + mt2[i];
          if (OUT_SIG) st_i[e][i] = rsig(st_i[e][i]);
        end
      end else if (s == 10) begin
        st_e[e] = 0;
        for (int i = 0; i < P2; i++) begin
          int jd;
          jd = st_i[e][i] - ex_t[e][i];
          st_l[e][i] = OUT_SIG ? rmul(rmul(jd, st_i[e][i]), ONE - st_i[e][i]) : jd;
          st_e[e] += rmul(jd, jd);
        end
        st_e[e] = st_e[e] >>> 1;
      end
    end
    for (int n = 0; n < inflight.size(); n++) begin
      int e, s;
      e = inflight[n];
      s = k - start[e];
      if (s == 12) begin
        for (int i = 0; i < P2; i++) begin
          mt2[i] -= rscale(st_l[e][i], DELTA);
          for (int j = 0; j < P1; j++) nq[e][i][j] = rmul(st_l[e][i], st_c[e][j]);
        end
        for (int j = 0; j < P1; j++) begin
          int o;
          o = 0;
          for (int kk = 0; kk < P2; kk++) o += rmul(st_l[e][kk], w2s[e][kk][j]);
          st_p[e][j] = rmul(st_h[e][j], o);
        end
      end else if (s == 13) begin
        for (int i = 0; i < P2; i++)
          for (int j = 0; j < P1; j++) mw2[i][j] -= rscale(nq[e][i][j], DELTA);
        nq.delete(e);
        w2s.delete(e);
      end else if (s == 15) begin
        for (int i = 0; i < P1; i++) begin
          mt1[i] -= rscale(st_p[e][i], DELTA);
          for (int j = 0; j < P0; j++) qq[e][i][j] = rmul(st_p[e][i], ex_z[e][j]);
        end
      end else if (s == 16) begin
        for (int i = 0; i < P1; i++)
          for (int j = 0; j < P0; j++) mw1[i][j] -= rscale(qq[e][i][j], DELTA);
        qq.delete(e);
      end
    end
  endtask

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    foreach (smp_z[j]) smp_z[j] = 0;
    foreach (smp_t[j]) smp_t[j] = 0;
    make_examples();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- load initial coefficients
    for (int l = 0; l < 2; l++) begin
      int no, ni;
      no = (l == 0) ? P1 : P2;
      ni = (l == 0) ? P0 : P1;
      for (int i = 0; i < no; i++)
        for (int j = 0; j <= ni; j++) begin
          @(negedge clk);
          ld_en = 1; ld_layer = l[0]; ld_bias = (j == ni); ld_row = 8'(i); ld_col = 8'(j);
          ld_data = (l == 0) ? rnd_fx(1.0) : rnd_fx(1.0);
          if (l == 0) begin
            if (j == ni) mt1[i] = ld_data; else mw1[i][j] = ld_data;
          end else begin
            if (j == ni) mt2[i] = ld_data; else mw2[i][j] = ld_data;
          end
        end
    end
    @(negedge clk);
    ld_en = 0;

    // ---- train
    k = 0;
    while (n_done < NEX) begin
      bit want_wr, pop, exp_full, pend;
      int cnt10, cnt12;
      @(negedge clk);
      // stimulus for clock k
      want_wr  = (n_written < NEX) && ((k / 300) % 4 != 1) && ($urandom % 8 != 0);
      // held off for the first 60 clocks so that the buffer fills up and the
      // pipeline later runs with all 17 stages occupied
      train_en = (k >= 60) && !(((k / 200) % 5 == 3) && (k % 200 < 40));
      ld_en = (k == 100) || (k == 101);
      ld_layer = 0; ld_bias = 0; ld_row = 0; ld_col = 0; ld_data = 32'h00ABCDEF;
      smp_wr_en = want_wr;
      if (want_wr) begin
        for (int j = 0; j < P0; j++) smp_z[j] = ex_z[n_written][j];
        for (int j = 0; j < P2; j++) smp_t[j] = ex_t[n_written][j];
      end
      #1;
      exp_full = (zq.size() == D) || (tq.size() == D + 11);
      check(smp_full == exp_full, $sformatf("smp_full at clock %0d", k));
      if (want_wr && exp_full) c_full++;
      pop = train_en && (zq.size() > 0);
      if (!train_en && zq.size() > 0) c_pause++;
      if (train_en && zq.size() == 0 && inflight.size() > 0) c_bubble++;
      if (pop) begin
        int e;
        e = zq.pop_front();
        start[e] = k;
        inflight.push_back(e);
        // delayed adaptation: an older example has not yet adapted w1
        if (inflight.size() > 1) c_delayed++;
      end
      if (inflight.size() == 17) c_allstages++;
      check(busy == (inflight.size() > 0), $sformatf("busy at clock %0d", k));
      check(ld_rejected == (ld_en && inflight.size() > 0), "ld_rejected");
      if (ld_rejected) c_reject++;
      check(n_trained == 32'(n_done), $sformatf("n_trained at clock %0d", k));
      model_clock(k);
      // outputs of clock k
      cnt10 = -1; cnt12 = -1;
      foreach (inflight[n]) begin
        if (k - start[inflight[n]] == 10) cnt10 = inflight[n];
        if (k - start[inflight[n]] == 12) cnt12 = inflight[n];
      end
      check(out_valid == (cnt10 >= 0), $sformatf("out_valid at clock %0d", k));
      if (cnt10 >= 0) begin
        for (int i = 0; i < P2; i++)
          check(out_z[i] == st_i[cnt10][i], $sformatf("out_z[%0d] of example %0d", i, cnt10));
        void'(tq.pop_front());
      end
      check(cost_valid == (cnt12 >= 0), $sformatf("cost_valid at clock %0d", k));
      if (cnt12 >= 0) begin
        real ee, pp;
        check(cost == st_e[cnt12], $sformatf("cost of example %0d: %0d vs %0d", cnt12, cost, st_e[cnt12]));
        ee = 0.0; pp = 0.0;
        for (int i = 0; i < P2; i++) begin
          ee += 2.0 * from_fx(st_e[cnt12]) / P2;
          pp += from_fx(ex_t[cnt12][i]) * from_fx(ex_t[cnt12][i]);
        end
        if (cnt12 < NEX / 4) begin e_first += ee / P2; p_first += pp; end
        if (cnt12 >= NEX - NEX / 4) begin e_last += ee / P2; p_last += pp; end
      end
      // retire finished examples
      while (inflight.size() > 0 && k - start[inflight[0]] >= 16) begin
        void'(inflight.pop_front());
        n_done++;
      end
      // buffer writes land at the clock edge
      if (want_wr && !exp_full) begin
        zq.push_back(n_written);
        tq.push_back(n_written);
        n_written++;
      end
      k++;
    end
    @(negedge clk);
    train_en = 0; smp_wr_en = 0; ld_en = 0;
    #1;
    check(!busy, "busy after drain");
    if (!busy) c_drain++;
    check(n_trained == 32'(NEX), "n_trained after drain");

    // ---- read back everything
    for (int l = 0; l < 2; l++) begin
      int no, ni;
      no = (l == 0) ? P1 : P2;
      ni = (l == 0) ? P0 : P1;
      for (int i = 0; i < no; i++)
        for (int j = 0; j <= ni; j++) begin
          int want;
          rd_layer = l[0]; rd_bias = (j == ni); rd_row = 8'(i); rd_col = 8'(j);
          #1;
          if (l == 0) want = (j == ni) ? mt1[i] : mw1[i][j];
          else        want = (j == ni) ? mt2[i] : mw2[i][j];
          check(rd_data == want, $sformatf("layer %0d coefficient %0d,%0d", l + 1, i, j));
        end
    end

    $display("mechanisms: full=%0d bubble=%0d pause=%0d all17=%0d delayed=%0d rejected=%0d drain=%0d",
             c_full, c_bubble, c_pause, c_allstages, c_delayed, c_reject, c_drain);
    check(c_full > 0, "buffer never full");
    check(c_bubble > 0, "no bubble");
    check(c_pause > 0, "never paused");
    check(c_allstages > 0, "pipeline never full");
    check(c_delayed > 0, "no delayed adaptation");
    check(c_reject > 0, "no refused load");
    check(c_drain > 0, "no drain");
    if (p_first > 0.0 && p_last > 0.0)
      $display("normalised squared error: first quarter %f, last quarter %f", e_first * P2 / p_first, e_last * P2 / p_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
