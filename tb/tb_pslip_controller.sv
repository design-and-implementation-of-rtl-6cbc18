// tb_pslip_controller: self-checking test of the scheduling-round sequencer.
//
// With N_ITER = 8 (default) and N_ITER = 3, a start pulse must give exactly
// N_ITER clocks of iterate, load in the first of them only, done one clock
// after the last iteration (N_ITER + 1 clocks after start) and ready again
// in the done clock itself, so that a start there runs the next round
// without a gap. Separate and back-to-back rounds are run.
module tb_pslip_controller;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic start8 = 0, start3 = 0;
  logic rdy8, it8, ld8, dn8; logic [2:0] ix8;
  logic rdy3, it3, ld3, dn3; logic [1:0] ix3;

  pslip_controller dut8 (.clk(clk), .rst(rst), .start(start8), .ready(rdy8),
    .iterate(it8), .load(ld8), .done(dn8), .iter_idx(ix8));
  pslip_controller #(.N_ITER(3)) dut3 (.clk(clk), .rst(rst), .start(start3), .ready(rdy3),
    .iterate(it3), .load(ld3), .done(dn3), .iter_idx(ix3));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int r = 0; r < 5; r++) begin
      int iters8, loads8, t8, iters3, loads3, t3;
      iters8 = 0; loads8 = 0; t8 = 0; iters3 = 0; loads3 = 0; t3 = 0;
      chk(rdy8 && rdy3, "ready before start");
      start8 = 1; start3 = 1;
      @(negedge clk);
      start8 = 0; start3 = 0;
      for (int c = 1; c <= 12; c++) begin
        if (it8) begin iters8++; chk(ix8 == c - 1, "iter_idx 8"); end
        if (ld8) begin loads8++; chk(c == 1, "load only first 8"); end
        if (it3) iters3++;
        if (ld3) begin loads3++; chk(c == 1, "load only first 3"); end
        if (dn8) begin t8 = c; chk(!it8, "done exclusive 8"); end
        if (dn3) t3 = c;
        chk(rdy8 == (c >= 9), "ready 8");
        @(negedge clk);
      end
      chk(iters8 == 8 && loads8 == 1 && t8 == 9, "round of 8");
      chk(iters3 == 3 && loads3 == 1 && t3 == 4, "round of 3");
    end
    // back to back: a start in the done clock begins the next round at once
    for (int r = 0; r < 4; r++) begin
      int c;
      start3 = 1;
      @(negedge clk);
      start3 = 0;
      c = 1;
      while (!dn3 && c < 20) begin @(negedge clk); c++; end
      chk(c == 4 && rdy3, "done after 3 iterations, ready in done clock");
      start3 = 1;
      @(negedge clk);
      start3 = 0;
      chk(it3 && ld3 && !dn3, "next round starts right after done");
      while (!dn3) @(negedge clk);
      @(negedge clk);
      chk(!it3 && rdy3 && !dn3, "idle after a round with no new start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
