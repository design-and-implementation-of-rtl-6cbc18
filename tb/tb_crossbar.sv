// tb_crossbar: self-checking test of the crossbar.
//
// Random partial permutations (each input to at most one output and vice
// versa) with random words and input valids on a 16-port, 32-bit crossbar;
// every output must carry exactly the word of the input matched to it, and
// unconnected outputs must be idle and zero.
module tb_crossbar;

  localparam int N = 16, W = 32;
  int checks = 0, failures = 0;
  logic [N-1:0][N-1:0] match;
  logic [N-1:0] in_valid, out_valid;
  logic [N-1:0][W-1:0] in_data, out_data;

  crossbar dut (.match(match), .in_valid(in_valid), .in_data(in_data),
                .out_valid(out_valid), .out_data(out_data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int perm [N];
      int src [N];
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      match = '0;
      for (int j = 0; j < N; j++) src[j] = -1;
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 3) != 0) begin match[i][perm[i]] = 1'b1; src[perm[i]] = i; end
      for (int i = 0; i < N; i++) begin in_data[i] = $urandom; in_valid[i] = $urandom_range(0, 7) != 0; end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (src[j] < 0) begin
          if (out_valid[j] || out_data[j] != '0) begin failures++; $display("FAIL idle output %0d", j); end
        end else if (out_valid[j] != in_valid[src[j]] || out_data[j] != in_data[src[j]]) begin
          failures++; $display("FAIL output %0d from input %0d", j, src[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
