// rr_arbitration: round-robin Arbitration of a Grant or Accept block.
//
// Given the list of candidates that request at the maximum priority
// (req_list, one bit per port) and the round-robin pointer of that priority
// level, it selects the first candidate at or after the pointer, wrapping
// from port N-1 to port 0, and returns its index. When req_list is empty,
// is_there goes high (the name is kept from the design's signal list; high
// means "no request") and sel is 0, a value the user must ignore.
// Purely combinational.
//
// The selection rule and the empty-list flag follow the original design;
// the linear wrap-around search is this implementation's own structure.
module rr_arbitration #(
  parameter int unsigned N  = pslip_pkg::N_PORTS,
  parameter int unsigned IW = $clog2(N)
) (
  input  logic [N-1:0]  req_list,
  input  logic [IW-1:0] ptr,
  output logic [IW-1:0] sel,
  output logic          is_there
);

  always_comb begin
    logic found;
    int unsigned idx;
    found = 1'b0;
    sel   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = int'(ptr) + k;
      if (idx >= N) idx -= N;
      if (!found && req_list[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end
    is_there = ~found;
  end

endmodule
