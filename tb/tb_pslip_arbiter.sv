// tb_pslip_arbiter: self-checking test of one Grant/Accept block.
//
// An 8-port, 4-level block receives random request lists (priority 0 where
// there is no request). A reference model keeps one round-robin pointer per
// level, picks the first port at the highest priority at or after that
// level's pointer, and on load moves only that level's pointer to one past
// the chosen port. select, sel_idx, sel_prio and is_there are compared every
// clock, so a wrong pointer update shows up in later picks.
module tb_pslip_arbiter;

  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [N-1:0] il = '0;
  logic [N-1:0][1:0] pl = '0;
  logic [N-1:0] select;
  logic [2:0] sel_idx;
  logic [1:0] sel_prio;
  logic is_there;
  int mptr [4];
  int loads_seen = 0;

  pslip_arbiter #(.N(N), .P(4)) dut (
    .clk(clk), .rst(rst), .load(load), .input_list(il), .prio_list(pl),
    .select(select), .sel_idx(sel_idx), .sel_prio(sel_prio), .is_there(is_there));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) mptr[p] = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int mx, pick;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        il[i] = ($urandom % 100) < 30;
        pl[i] = il[i] ? 2'($urandom) : 2'b00;
      end
      if (n % 17 == 0) begin il = '0; pl = '0; end
      load = $urandom_range(0, 1);
      #1;
      mx = 0;
      for (int i = 0; i < N; i++) if (il[i] && pl[i] > mx) mx = pl[i];
      pick = -1;
      for (int k = 0; k < N; k++) begin
        int idx;
        idx = (mptr[mx] + k) % N;
        if (pick < 0 && il[idx] && pl[idx] == mx) pick = idx;
      end
      checks++;
      if (pick < 0) begin
        if (!is_there || select != '0) begin
          failures++;
          $display("FAIL n=%0d empty list: is_there=%b select=%b", n, is_there, select);
        end
      end else if (is_there || sel_idx != pick || select != (N'(1) << pick) || sel_prio != mx) begin
        failures++;
        $display("FAIL n=%0d il=%b sel=%0d exp %0d prio=%0d exp %0d", n, il, sel_idx, pick, sel_prio, mx);
      end
      @(posedge clk);
      if (load && pick >= 0) begin
        mptr[mx] = (pick + 1) % N;
        loads_seen++;
      end
    end
    checks++;
    if (loads_seen < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
