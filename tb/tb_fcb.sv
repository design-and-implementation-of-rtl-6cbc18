// tb_fcb: self-checking test of the flow-control broadcast.
//
// Random full/empty occupancy flags per output (never both at once, as a
// queue can not be both) drive an 8-output FCB. A reference keeps, per
// output, a flag set by full and cleared only by empty; pause must equal
// full OR that flag every clock. The test counts pause episodes that
// outlast the full flag (the hysteresis) and fails if there are none.
module tb_fcb;

  localparam int N = 8;
  int checks = 0, failures = 0, held_pauses = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0] full = '0, empty = '0, pause;
  logic [N-1:0] model = '0;

  fcb #(.N(N)) dut (.clk(clk), .rst(rst), .oq_full(full), .oq_empty(empty), .pause(pause));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < N; j++) begin
        int r;
        r = $urandom_range(0, 9);
        full[j]  = (r == 0);
        empty[j] = (r == 1);
      end
      #1;
      checks++;
      if (pause != (full | model)) begin
        failures++; $display("FAIL pause=%b exp %b", pause, full | model);
      end
      for (int j = 0; j < N; j++) if (model[j] && !full[j]) held_pauses++;
      @(posedge clk);
      model = (model | full) & ~empty;
      @(negedge clk);
    end
    checks++;
    if (held_pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
