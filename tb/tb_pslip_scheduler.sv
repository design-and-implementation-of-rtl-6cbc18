// tb_pslip_scheduler: self-checking test of the P-iSLIP scheduler at its
// default size (16 x 16, 4 priority levels, 8 iterations).
//
// Every round a random request matrix (random density, random priorities)
// is applied. An independent reference model of P-iSLIP - per-output grant
// pointers and per-input accept pointers for each level, highest-priority-
// first grant and accept, round-robin within a level, pointers moved only
// in the first iteration and a grant pointer only when its grant was
// accepted - computes the expected matching, which must equal the
// scheduler's match when done rises. The latency from start to done must
// be N_ITER + 1 clocks, whether a round follows the previous one with a
// gap or starts in its done clock. The test also counts rounds in which later
// iterations added pairs, and fails if none did.
module tb_pslip_scheduler;

  localparam int N = 16, P = 4, IT = 8;
  int checks = 0, failures = 0;
  int late_rounds = 0;

  logic clk = 0, rst = 1, start = 0;
  logic ready, done;
  logic [N-1:0][N-1:0] req_valid = '0;
  logic [N-1:0][N-1:0][1:0] req_prio = '0;
  logic [N-1:0][N-1:0] match;
  logic [N-1:0] in_matched;
  logic [N-1:0][3:0] in_match_out;

  pslip_scheduler dut (
    .clk(clk), .rst(rst), .start(start), .ready(ready), .done(done),
    .req_valid(req_valid), .req_prio(req_prio), .match(match),
    .in_matched(in_matched), .in_match_out(in_match_out));

  always #5 clk = ~clk;

  int gptr [N][P];
  int aptr [N][P];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference P-iSLIP round; returns the expected matching.
  task automatic model_round(output logic [N-1:0][N-1:0] m, output int late);
    int mi [N];
    int mo [N];
    int g [N];
    int gp [N];
    int a [N];
    int ap [N];
    m = '0; late = 0;
    for (int k = 0; k < N; k++) begin mi[k] = -1; mo[k] = -1; end
    for (int it = 0; it < IT; it++) begin
      // grant
      for (int j = 0; j < N; j++) begin
        int mx;
        mx = -1; g[j] = -1; gp[j] = 0;
        if (mo[j] < 0)
          for (int i = 0; i < N; i++)
            if (req_valid[i][j] && mi[i] < 0 && int'(req_prio[i][j]) > mx) mx = req_prio[i][j];
        if (mx >= 0)
          for (int k = 0; k < N; k++) begin
            int i;
            i = (gptr[j][mx] + k) % N;
            if (g[j] < 0 && req_valid[i][j] && mi[i] < 0 && req_prio[i][j] == mx) begin
              g[j] = i; gp[j] = mx;
            end
          end
      end
      // accept
      for (int i = 0; i < N; i++) begin
        int mx;
        mx = -1; a[i] = -1; ap[i] = 0;
        for (int j = 0; j < N; j++) if (g[j] == i && gp[j] > mx) mx = gp[j];
        if (mx >= 0)
          for (int k = 0; k < N; k++) begin
            int j;
            j = (aptr[i][mx] + k) % N;
            if (a[i] < 0 && g[j] == i && gp[j] == mx) begin a[i] = j; ap[i] = mx; end
          end
      end
      for (int i = 0; i < N; i++)
        if (a[i] >= 0) begin
          if (it == 0) begin
            aptr[i][ap[i]] = (a[i] + 1) % N;
            gptr[a[i]][gp[a[i]]] = (i + 1) % N;
          end else late = 1;
          mi[i] = a[i]; mo[a[i]] = i; m[i][a[i]] = 1'b1;
        end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) for (int p = 0; p < P; p++) begin gptr[k][p] = 0; aptr[k][p] = 0; end
    @(negedge clk); @(negedge clk); rst = 0;
    for (int r = 0; r < 1500; r++) begin
      logic [N-1:0][N-1:0] exp_m;
      int dens, late, lat;
      dens = (r % 5) * 20 + 5;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          req_valid[i][j] = ($urandom % 100) < dens;
          req_prio[i][j]  = 2'($urandom);
        end
      // every other round starts in the done clock of the previous one
      while (!ready) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      model_round(exp_m, late);
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      // requests change while the round runs: the stored copy must be used
      req_valid = ~req_valid;
      checks++;
      if (lat != IT + 1) begin
        failures++; $display("FAIL latency %0d", lat);
      end
      checks++;
      if (match !== exp_m) begin
        failures++;
        if (failures < 5) $display("FAIL round %0d match mismatch", r);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_matched[i] != |exp_m[i] || (in_matched[i] && !exp_m[i][in_match_out[i]])) failures++;
      end
      late_rounds += late;
      if (r % 2 == 1) @(negedge clk);
    end
    checks++;
    if (late_rounds == 0) begin failures++; $display("FAIL no multi-iteration round"); end
    $display("rounds with matches after the first iteration: %0d", late_rounds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
