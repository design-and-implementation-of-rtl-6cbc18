// tb_get_max_priority: self-checking test of get_max_priority.
//
// Three instances are checked: the default 16-entry list of two-bit codes
// (the gate-level Temp0/Temp1/Temp2 path), an 8-entry list of one-bit codes
// and a 5-entry list of three-bit codes (the generic path). Directed cases
// cover the 00/01/10 mix that a plain OR of the LSBs gets wrong; random
// lists follow. Expected values come from a straightforward maximum search.
module tb_get_max_priority;

  int checks = 0, failures = 0;

  logic [15:0][1:0] pl2;  logic [15:0] il2;
  logic [1:0] mp2;        logic [15:0] ml2;  logic any2;
  logic [7:0][0:0]  pl1;  logic [7:0]  il1;
  logic [0:0] mp1;        logic [7:0]  ml1;  logic any1;
  logic [4:0][2:0]  pl3;  logic [4:0]  il3;
  logic [2:0] mp3;        logic [4:0]  ml3;  logic any3;

  get_max_priority dut2 (.prio_list(pl2), .input_list(il2), .max_priority(mp2),
                         .max_priority_list(ml2), .any_req(any2));
  get_max_priority #(.N(8), .PW(1)) dut1 (.prio_list(pl1), .input_list(il1),
                         .max_priority(mp1), .max_priority_list(ml1), .any_req(any1));
  get_max_priority #(.N(5), .PW(3)) dut3 (.prio_list(pl3), .input_list(il3),
                         .max_priority(mp3), .max_priority_list(ml3), .any_req(any3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check2();
    int mx = 0; logic [15:0] lst = '0;
    #1;
    for (int i = 0; i < 16; i++) if (il2[i] && pl2[i] > mx) mx = pl2[i];
    for (int i = 0; i < 16; i++) lst[i] = il2[i] && (pl2[i] == mx);
    checks++;
    if (mp2 != mx || ml2 != lst || any2 != |il2) begin
      failures++;
      $display("FAIL N16: il=%h max=%0d exp %0d list=%h exp %h", il2, mp2, mx, ml2, lst);
    end
  endtask

  task automatic rand2(input int density);
    for (int i = 0; i < 16; i++) begin
      il2[i] = ($urandom % 100) < density;
      pl2[i] = il2[i] ? 2'($urandom) : 2'b00;
    end
  endtask

  initial begin
    // directed: 00, 01 and 10 present -> maximum is 10
    il2 = 16'h0007; pl2 = '0; pl2[1] = 2'b01; pl2[2] = 2'b10; check2();
    // only 00 and 01 -> 01
    il2 = 16'h0003; pl2 = '0; pl2[1] = 2'b01; check2();
    // 11 present -> 11
    il2 = 16'h8101; pl2 = '0; pl2[8] = 2'b10; pl2[15] = 2'b11; check2();
    // all requests at priority 00
    il2 = 16'h0f0f; pl2 = '0; check2();
    // empty list
    il2 = '0; pl2 = '0; check2();
    for (int n = 0; n < 3000; n++) begin
      rand2((n % 4) * 30 + 5);
      check2();
    end
    for (int n = 0; n < 1000; n++) begin
      int mx;
      logic [7:0] l1;
      logic [4:0] l3;
      for (int i = 0; i < 8; i++) begin il1[i] = $urandom_range(0, 1); pl1[i] = il1[i] ? 1'($urandom) : 1'b0; end
      for (int i = 0; i < 5; i++) begin il3[i] = $urandom_range(0, 1); pl3[i] = il3[i] ? 3'($urandom) : 3'b000; end
      #1;
      mx = 0; for (int i = 0; i < 8; i++) if (il1[i] && pl1[i] > mx) mx = pl1[i];
      for (int i = 0; i < 8; i++) l1[i] = il1[i] && (pl1[i] == mx);
      checks++;
      if (mp1 != mx || ml1 != l1 || any1 != |il1) begin failures++; $display("FAIL N8P2"); end
      mx = 0; for (int i = 0; i < 5; i++) if (il3[i] && pl3[i] > mx) mx = pl3[i];
      for (int i = 0; i < 5; i++) l3[i] = il3[i] && (pl3[i] == mx);
      checks++;
      if (mp3 != mx || ml3 != l3 || any3 != |il3) begin failures++; $display("FAIL N5P8"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
