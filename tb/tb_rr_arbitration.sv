// tb_rr_arbitration: self-checking test of rr_arbitration.
//
// First the five published example cases of the 8-port arbitration
// (pointer, request list -> selected port, "no request" flag), then random
// lists on the default 16-port arbiter against a wrap-around search model.
module tb_rr_arbitration;

  int checks = 0, failures = 0;

  logic [7:0]  req8;  logic [2:0] ptr8, sel8; logic none8;
  logic [15:0] req16; logic [3:0] ptr16, sel16; logic none16;

  rr_arbitration #(.N(8)) dut8 (.req_list(req8), .ptr(ptr8), .sel(sel8), .is_there(none8));
  rr_arbitration dut16 (.req_list(req16), .ptr(ptr16), .sel(sel16), .is_there(none16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic case8(input logic [2:0] p, input logic [7:0] r,
                       input logic [2:0] exp_sel, input logic exp_none);
    ptr8 = p; req8 = r; #2;
    checks++;
    if (none8 != exp_none || (!exp_none && sel8 != exp_sel)) begin
      failures++;
      $display("FAIL ptr=%b req=%b sel=%b none=%b (exp %b %b)", p, r, sel8, none8, exp_sel, exp_none);
    end
  endtask

  initial begin
    case8(3'b000, 8'b00010101, 3'b000, 1'b0);
    case8(3'b010, 8'b11010010, 3'b100, 1'b0);
    case8(3'b110, 8'b00001100, 3'b010, 1'b0);
    case8(3'b111, 8'b00000000, 3'b000, 1'b1);
    case8(3'b101, 8'b10001111, 3'b111, 1'b0);
    for (int n = 0; n < 5000; n++) begin
      int exp;
      req16 = 16'($urandom) & 16'($urandom);
      if (n % 10 == 0) req16 = '0;
      ptr16 = 4'($urandom);
      #1;
      exp = -1;
      for (int k = 0; k < 16; k++)
        if (exp < 0 && req16[(ptr16 + k) % 16]) exp = (ptr16 + k) % 16;
      checks++;
      if ((exp < 0) != none16 || (exp >= 0 && sel16 != exp)) begin
        failures++;
        $display("FAIL ptr=%0d req=%h sel=%0d exp=%0d", ptr16, req16, sel16, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
