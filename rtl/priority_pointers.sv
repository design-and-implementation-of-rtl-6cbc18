// priority_pointers: the bank of round-robin pointers of a Grant or Accept
// block, one pointer per priority level.
//
// The maximum priority found in the current list (level) is decoded to pick
// one pointer; that pointer drives ptr (a multiplexer here, where the
// original scheme joins tri-state pointer outputs on a shared bus). On a
// clock edge with load high, the selected pointer takes next_ptr; the others
// keep their value. rst (synchronous, active high) clears every pointer to
// port 0. The pointers are edge-triggered registers rather than latches.
//
// One pointer per level, decoded by the maximum priority, follows the
// original design; flip-flops and a multiplexer replace its tri-state
// latches.
module priority_pointers #(
  parameter int unsigned N  = pslip_pkg::N_PORTS,
  parameter int unsigned P  = pslip_pkg::N_PRIO,
  parameter int unsigned IW = $clog2(N),
  parameter int unsigned PW = $clog2(P)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [PW-1:0] level,
  input  logic [IW-1:0] next_ptr,
  output logic [IW-1:0] ptr
);

  logic [P-1:0][IW-1:0] ptr_q;
  logic [P-1:0]         enable;

  // Level decoder: one enable per pointer.
  always_comb begin
    for (int unsigned p = 0; p < P; p++) enable[p] = (int'(level) == p);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr_q <= '0;
    end else if (load) begin
      for (int unsigned p = 0; p < P; p++)
        if (enable[p]) ptr_q[p] <= next_ptr;
    end
  end

  always_comb begin
    ptr = '0;
    for (int unsigned p = 0; p < P; p++)
      if (enable[p]) ptr = ptr_q[p];
  end

endmodule
