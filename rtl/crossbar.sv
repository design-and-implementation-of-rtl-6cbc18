// crossbar: N x N crossbar switch.
//
// match[i][j] connects input i to output j for the current clock; the
// scheduler guarantees at most one 1 per row and per column. Each output is
// an AND-OR multiplexer over the inputs: out_data[j] carries the word of the
// input connected to it and out_valid[j] is high when that input presents a
// valid word. Purely combinational.
//
// The crossbar's role follows the original architecture; the AND-OR
// multiplexer structure is this implementation's choice.
module crossbar #(
  parameter int unsigned N = pslip_pkg::N_PORTS,
  parameter int unsigned W = pslip_pkg::CELL_W
) (
  input  logic [N-1:0][N-1:0] match,
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        out_valid,
  output logic [N-1:0][W-1:0] out_data
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = 1'b0;
      out_data[j]  = '0;
      for (int i = 0; i < N; i++) begin
        out_valid[j] |= match[i][j] & in_valid[i];
        out_data[j]  |= {W{match[i][j]}} & in_data[i];
      end
    end
  end

endmodule
