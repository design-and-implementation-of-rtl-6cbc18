// tb_iteration_sweep: matching efficiency of P-iSLIP against the number of
// iterations, for 8, 16 and 32 ports with 2 and 4 priority levels.
//
// Six schedulers run side by side with 10 iterations each. Every round, each
// receives a fresh random request matrix (each input/output pair requests
// with probability 1/2, at a uniformly random priority). The matching is
// read after every iteration, and the percentage of ports connected after
// iteration k (summed over all rounds) is printed as a table, one row per
// configuration. Checks: the matching never shrinks from one iteration to
// the next, never holds a pair that did not request, is a partial
// permutation, and gains nothing after the iteration in which no new pair
// was added.
module tb_iteration_sweep;

  localparam int IT = 10;
  localparam int ROUNDS = 10000;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  always #5 clk = ~clk;

  initial begin
    repeat (ROUNDS * (IT + 3) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] done_v;
  logic start = 0;
  longint conn [6][IT + 1];
  int np [6] = '{8, 16, 32, 8, 16, 32};
  int pp [6] = '{2, 2, 2, 4, 4, 4};

  // One scheduler plus its stimulus and measurement per configuration.
  `define SWEEP_INST(IDX, NN, PPP, PWW) \
  begin : g_``IDX \
    logic ready, done; \
    logic [NN-1:0][NN-1:0] rv, m, m_prev; \
    logic [NN-1:0][NN-1:0][PWW-1:0] rp; \
    logic [NN-1:0] im; \
    logic [NN-1:0][$clog2(NN)-1:0] imo; \
    int it_cnt; \
    pslip_scheduler #(.N(NN), .P(PPP), .N_ITER(IT)) u ( \
      .clk(clk), .rst(rst), .start(start), .ready(ready), .done(done), \
      .req_valid(rv), .req_prio(rp), .match(m), .in_matched(im), .in_match_out(imo)); \
    assign done_v[IDX] = done; \
    always @(negedge clk) if (ready) begin \
      for (int i = 0; i < NN; i++) for (int j = 0; j < NN; j++) begin \
        rv[i][j] = 1'($urandom_range(0, 1)); rp[i][j] = PWW'($urandom); \
      end \
    end \
    always @(posedge clk) begin \
      if (start && ready) begin it_cnt = 0; m_prev = '0; end \
      else if (u.iterate) it_cnt++; \
    end \
    always @(negedge clk) if (!rst && it_cnt > 0 && it_cnt <= IT && u.u_ctrl.state_q != 0) begin \
      int c; logic r_ok; \
      logic [NN-1:0] colseen; \
      c = 0; r_ok = 1; colseen = '0; \
      for (int i = 0; i < NN; i++) begin \
        if (!$onehot0(m[i])) r_ok = 0; \
        if ((m[i] & ~u.rv_q[i]) != '0) r_ok = 0; \
        if ((colseen & m[i]) != '0) r_ok = 0; \
        colseen |= m[i]; \
        c += $countones(m[i]); \
      end \
      if ((m_prev & ~m) != '0) r_ok = 0; \
      checks++; \
      if (!r_ok) begin failures++; $display("FAIL config %0d", IDX); end \
      conn[IDX][it_cnt] += longint'(c); \
      m_prev = m; \
    end \
  end

  `SWEEP_INST(0, 8, 2, 1)
  `SWEEP_INST(1, 16, 2, 1)
  `SWEEP_INST(2, 32, 2, 1)
  `SWEEP_INST(3, 8, 4, 2)
  `SWEEP_INST(4, 16, 4, 2)
  `SWEEP_INST(5, 32, 4, 2)

  initial begin
    for (int c = 0; c < 6; c++) for (int k = 0; k <= IT; k++) conn[c][k] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (done_v != '1) @(negedge clk);
    end
    @(negedge clk);
    $display("connected ports (%%) after iteration 1..%0d, %0d random request matrices", IT, ROUNDS);
    for (int c = 0; c < 6; c++) begin
      string s;
      s = $sformatf("N=%0d P=%0d:", np[c], pp[c]);
      for (int k = 1; k <= IT; k++)
        s = {s, $sformatf(" %5.1f", 100.0 * real'(conn[c][k]) / real'(ROUNDS * np[c]))};
      $display("%s", s);
      checks++;
      if (conn[c][IT] < conn[c][1] || conn[c][1] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
