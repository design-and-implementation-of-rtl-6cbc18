// tb_switch_fabric: end-to-end test of the switch fabric.
//
// A 4-port fabric (4 priorities, 4 iterations, 3-cell VOQs, 2-cell output
// queues) is fed random traffic on every input; each cell's payload tags its
// input and a sequence number. Output receivers stall at random. A
// scoreboard keeps, per input, output and priority, the cells in the order
// they were accepted; every delivered cell must be the oldest outstanding
// one of its (input, output, priority) and arrive at the right output with
// the right priority. After the traffic stops all cells must have been
// delivered. The run alternates light and heavy phases and counts the
// mechanisms of the design: refused arrivals (VOQ full), flow-control
// pauses, pairs matched in a later iteration, grants decided by priority,
// deliveries where a higher class overtook a waiting lower one, and
// receiver stalls. Each must happen at least once.
module tb_switch_fabric;

  localparam int N = 4, P = 4, IT = 4;
  int checks = 0, failures = 0;
  int refused = 0, pauses = 0, late = 0, prio_dec = 0, overtake = 0, stalls = 0;
  int sent = 0, recv = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  logic [N-1:0][31:0] in_data = '0, out_data;
  logic [N-1:0][1:0] in_dest = '0, in_prio = '0, out_prio;
  logic sched_done;
  logic [N-1:0][N-1:0] sched_match;
  logic [N-1:0] fc_pause;
  logic [31:0] sb [N][N][P][$];
  int seq [N];
  logic traffic = 1;

  switch_fabric #(.N(N), .P(P), .N_ITER(IT), .CELL_W(32), .VOQ_DEPTH(3), .OQ_DEPTH(2)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .in_dest(in_dest), .in_prio(in_prio), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data), .out_prio(out_prio), .sched_done(sched_done),
    .sched_match(sched_match), .fc_pause(fc_pause));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // which class queues of each output hold cells
  logic [N-1:0][P-1:0] cls_busy;
  for (genvar j = 0; j < N; j++) begin : g_cls
    for (genvar p = 0; p < P; p++) begin : g_p
      assign cls_busy[j][p] = dut.g_out[j].u_opp.cnt_q[p] != 0;
    end
  end

  int cyc = 0;
  always @(negedge clk) begin
    if (!rst) begin
      logic heavy;
      cyc++;
      heavy = (cyc / 1000) % 2 == 1;
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = traffic && ($urandom_range(0, 9) < (heavy ? 8 : 2));
          in_dest[i]  = heavy ? 2'($urandom_range(0, 1)) : 2'($urandom);
          in_prio[i]  = 2'($urandom);
          in_data[i]  = {4'(i), 28'(seq[i])};
        end
        out_ready[i] = $urandom_range(0, 9) < (heavy ? 3 : 9);
      end
    end
  end

  // scoreboard and coverage, sampled just before each rising edge
  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          sb[i][in_dest[i]][in_prio[i]].push_back(in_data[i]);
          seq[i]++; sent++;
        end
        if (in_valid[i] && !in_ready[i]) refused++;
      end
      for (int j = 0; j < N; j++) begin
        if (out_valid[j] && !out_ready[j]) stalls++;
        if (out_valid[j] && out_ready[j]) begin
          int src;
          src = int'(out_data[j][31:28]);
          checks++; recv++;
          if (src >= N || sb[src][j][out_prio[j]].size() == 0 ||
              sb[src][j][out_prio[j]][0] != out_data[j]) begin
            failures++;
            if (failures < 5) $display("FAIL output %0d got %h prio %0d", j, out_data[j], out_prio[j]);
          end else void'(sb[src][j][out_prio[j]].pop_front());
          for (int p = 0; p < int'(out_prio[j]); p++)
            if (cls_busy[j][p]) overtake++;
        end
        if (fc_pause[j] && !dut.oq_full[j]) pauses++;
      end
      if (dut.u_sched.iterate && dut.u_sched.u_ctrl.cnt_q != 0 && dut.u_sched.accept_m != '0) late++;
      if (dut.sched_start) begin
        for (int j = 0; j < N; j++) begin
          int lo, hi;
          lo = P; hi = -1;
          for (int i = 0; i < N; i++)
            if (dut.req_valid[i][j]) begin
              if (int'(dut.req_prio[i][j]) < lo) lo = dut.req_prio[i][j];
              if (int'(dut.req_prio[i][j]) > hi) hi = dut.req_prio[i][j];
            end
          if (hi > lo) prio_dec++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) seq[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (6000) @(negedge clk);
    traffic = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (recv != sent || sent == 0) begin
      failures++; $display("FAIL sent %0d received %0d", sent, recv);
    end
    $display("cells %0d, refused %0d, pauses %0d, late matches %0d, priority grants %0d, overtakes %0d, stalls %0d",
             sent, refused, pauses, late, prio_dec, overtake, stalls);
    checks++;
    if (refused == 0 || pauses == 0 || late == 0 || prio_dec == 0 || overtake == 0 || stalls == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
