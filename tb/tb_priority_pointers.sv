// tb_priority_pointers: self-checking test of priority_pointers.
//
// Random loads into random levels of the default bank (16 ports, 4 levels)
// are mirrored in a reference array; after every clock the pointer of a
// random level is read back and compared. A reset in the middle must clear
// every level.
module tb_priority_pointers;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [1:0] level = 0;
  logic [3:0] next_ptr = 0, ptr;
  int model [4];

  priority_pointers dut (.clk(clk), .rst(rst), .load(load), .level(level),
                         .next_ptr(next_ptr), .ptr(ptr));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int p = 0; p < 4; p++) begin
      level = 2'(p); #1;
      checks++;
      if (ptr != model[p]) begin
        failures++;
        $display("FAIL level %0d ptr=%0d exp %0d", p, ptr, model[p]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) model[p] = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    read_all();
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 1000) begin
        rst = 1; load = 1;
        @(negedge clk); rst = 0; load = 0;
        for (int p = 0; p < 4; p++) model[p] = 0;
        read_all();
      end
      load = ($urandom % 3) != 0;
      level = 2'($urandom);
      next_ptr = 4'($urandom);
      @(posedge clk);
      if (load) model[level] = next_ptr;
      #1;
      load = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
