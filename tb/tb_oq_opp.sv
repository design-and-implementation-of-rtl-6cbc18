// tb_oq_opp: self-checking test of the output port (4 classes of 4 cells).
//
// Random writes (only into classes that have room, as flow control
// guarantees) and a randomly stalling receiver. A reference of four queues
// predicts each delivered cell: the oldest cell of the highest non-empty
// class. full (a class queue full, or filled by this clock's write) and
// empty are compared with the reference every clock. The
// test counts deliveries where a higher class overtook waiting lower-class
// cells, receiver stalls and full episodes, and fails if any is missing.
module tb_oq_opp;

  int checks = 0, failures = 0;
  int overtakes = 0, stalls = 0, fulls = 0;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_ready = 0;
  logic [31:0] in_data = 0;
  logic [1:0] in_prio = 0;
  logic out_valid, full, empty;
  logic [31:0] out_data;
  logic [1:0] out_prio;
  logic [31:0] q [4][$];

  oq_opp dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .in_prio(in_prio), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data), .out_prio(out_prio), .full(full), .empty(empty));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 5000; n++) begin
      int hp;
      logic mfull;
      in_prio  = 2'($urandom);
      in_valid = ($urandom_range(0, 9) < ((n / 500) % 2 ? 7 : 3)) && q[in_prio].size() < 4;
      in_data  = $urandom;
      out_ready = $urandom_range(0, 9) < ((n / 500) % 2 ? 2 : 8);
      #1;
      hp = -1; mfull = 0;
      for (int p = 0; p < 4; p++) begin
        if (q[p].size() > 0) hp = p;
        if (q[p].size() == 4 || (in_valid && in_prio == p && q[p].size() == 3)) mfull = 1;
      end
      checks++;
      if (full != mfull || empty != (hp < 0) || out_valid != (hp >= 0)) begin
        failures++; $display("FAIL flags n=%0d", n);
      end
      if (mfull) fulls++;
      if (hp >= 0) begin
        checks++;
        if (out_prio != hp || out_data != q[hp][0]) begin
          failures++; $display("FAIL data n=%0d prio=%0d exp %0d", n, out_prio, hp);
        end
        if (!out_ready) stalls++;
      end
      @(posedge clk);
      if (hp >= 0 && out_ready) begin
        for (int p = 0; p < hp; p++) if (q[p].size() > 0) begin overtakes++; break; end
        void'(q[hp].pop_front());
      end
      if (in_valid) q[in_prio].push_back(in_data);
      @(negedge clk);
    end
    checks++;
    if (overtakes == 0 || stalls == 0 || fulls == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", overtakes, stalls, fulls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
