// tb_ipp_voq: self-checking test of an input port with its virtual output
// queues (4 outputs, 4 priorities, 3 cells per queue, 16-bit cells).
//
// Random arrivals, random pause vectors and random departures toward
// outputs that have cells. A reference of 16 queues predicts in_ready, the
// request row (valid unless paused, highest non-empty priority, as left
// after this clock's departure) and every
// departing cell (oldest cell of the highest non-empty priority for the
// output). The test counts refused arrivals (queue full), paused requests
// and same-clock write/pop of one queue, and fails if any never happens.
module tb_ipp_voq;

  localparam int N = 4, P = 4, D = 3;
  int checks = 0, failures = 0;
  int refused = 0, paused = 0, same_q = 0;
  logic clk = 0, rst = 1;
  logic in_valid = 0, deq_valid = 0;
  logic in_ready, out_valid;
  logic [15:0] in_data = 0, out_data;
  logic [1:0] in_dest = 0, in_prio = 0, deq_dest = 0, out_prio;
  logic [N-1:0] pause = '0, req_valid;
  logic [N-1:0][1:0] req_prio;
  logic [15:0] q [N][P][$];

  ipp_voq #(.N(N), .P(P), .CELL_W(16), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .in_dest(in_dest), .in_prio(in_prio), .pause(pause),
    .req_valid(req_valid), .req_prio(req_prio), .deq_valid(deq_valid),
    .deq_dest(deq_dest), .out_valid(out_valid), .out_data(out_data), .out_prio(out_prio));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int top_prio(int j);
    int hp = -1;
    for (int p = 0; p < P; p++) if (q[j][p].size() > 0) hp = p;
    return hp;
  endfunction

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int hp, dep_prio, cand [$];
      logic [15:0] dep_data;
      in_valid = $urandom_range(0, 9) < ((n / 600) % 2 ? 9 : 4);
      in_dest  = 2'($urandom);
      in_prio  = 2'($urandom);
      in_data  = 16'($urandom);
      pause    = ($urandom_range(0, 3) == 0) ? 4'($urandom) : '0;
      cand.delete();
      for (int j = 0; j < N; j++) if (top_prio(j) >= 0) cand.push_back(j);
      deq_valid = cand.size() > 0 && $urandom_range(0, 9) < ((n / 600) % 2 ? 3 : 6);
      deq_dest  = deq_valid ? 2'(cand[$urandom_range(0, cand.size() - 1)]) : 2'($urandom);
      #1;
      if (deq_valid) begin
        dep_prio = top_prio(deq_dest);
        dep_data = q[deq_dest][dep_prio][0];
      end
      checks++;
      if (in_ready != (q[in_dest][in_prio].size() < D)) begin failures++; $display("FAIL in_ready"); end
      if (in_valid && !in_ready) refused++;
      // requests describe the queues after this clock's departure
      if (deq_valid) void'(q[deq_dest][top_prio(deq_dest)].pop_front());
      for (int j = 0; j < N; j++) begin
        hp = top_prio(j);
        checks++;
        if (req_valid[j] != (hp >= 0 && !pause[j]) || (hp >= 0 && req_prio[j] != hp)) begin
          failures++; $display("FAIL request row output %0d", j);
        end
        if (hp >= 0 && pause[j]) paused++;
      end
      if (deq_valid) begin
        checks++;
        if (!out_valid || out_prio != dep_prio || out_data != dep_data) begin
          failures++; $display("FAIL departure n=%0d", n);
        end
        if (in_valid && in_ready && in_dest == deq_dest && in_prio == dep_prio) same_q++;
      end
      @(posedge clk);
      if (in_valid && in_ready) q[in_dest][in_prio].push_back(in_data);
      @(negedge clk);
    end
    checks++;
    if (refused == 0 || paused == 0 || same_q == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", refused, paused, same_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
