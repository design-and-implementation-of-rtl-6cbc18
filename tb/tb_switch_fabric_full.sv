// tb_switch_fabric_full: the fabric at its default size (16 ports,
// 4 priorities, 8 iterations, 32-bit cells) carrying one complete burst.
//
// Each of the 16 inputs offers 12 cells: to outputs (i + k) mod 16 with
// rotating priorities, so that every output is wanted by many inputs at
// once. Receivers are always ready. Every delivered cell is checked against
// a per (input, output, priority) scoreboard, all 192 cells must arrive, and
// the burst must be through within a bound of cell times: each output
// receives 12 cells and a cell time is N_ITER + 1 = 9 clocks.
module tb_switch_fabric_full;

  localparam int N = 16, P = 4, CELLS = 12;
  int checks = 0, failures = 0, sent = 0, recv = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  logic [N-1:0][31:0] in_data = '0, out_data;
  logic [N-1:0][3:0] in_dest = '0;
  logic [N-1:0][1:0] in_prio = '0, out_prio;
  logic sched_done;
  logic [N-1:0][N-1:0] sched_match;
  logic [N-1:0] fc_pause;
  logic [31:0] sb [N][N][P][$];
  int k [N];

  switch_fabric dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .in_dest(in_dest), .in_prio(in_prio), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data), .out_prio(out_prio), .sched_done(sched_done),
    .sched_match(sched_match), .fc_pause(fc_pause));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst)
      for (int i = 0; i < N; i++) begin
        in_valid[i] = k[i] < CELLS;
        in_dest[i]  = 4'((i + k[i]) % N);
        in_prio[i]  = 2'((i + k[i]) % P);
        in_data[i]  = {4'(i), 28'(k[i])};
      end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++)
        if (in_valid[i] && in_ready[i]) begin
          sb[i][in_dest[i]][in_prio[i]].push_back(in_data[i]);
          k[i]++; sent++;
        end
      for (int j = 0; j < N; j++)
        if (out_valid[j]) begin
          int src;
          src = int'(out_data[j][31:28]);
          checks++; recv++;
          if (sb[src][j][out_prio[j]].size() == 0 || sb[src][j][out_prio[j]][0] != out_data[j]) begin
            failures++; $display("FAIL output %0d got %h", j, out_data[j]);
          end else void'(sb[src][j][out_prio[j]].pop_front());
        end
    end
  end

  initial begin
    int t;
    for (int i = 0; i < N; i++) k[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    while (recv < N * CELLS && t < 5000) begin @(negedge clk); t++; end
    $display("burst of %0d cells delivered in %0d clocks", recv, t);
    checks++;
    if (recv != N * CELLS || sent != N * CELLS) failures++;
    checks++;
    if (t > (CELLS + 6) * 9) begin failures++; $display("FAIL too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
