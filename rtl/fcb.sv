// fcb: Flow Control Broadcast.
//
// Watches the occupancy of every output queue and broadcasts one pause bit
// per output to all input ports. pause[j] rises as soon as output queue j
// reports full (oq_full[j], same clock) and then holds until that queue has
// drained completely (oq_empty[j]); only then do the virtual output queues
// for j resume sending. The hysteresis keeps a nearly full queue from being
// refilled cell by cell. rst (synchronous, active high) clears every pause.
//
// Pause-on-full and resume-after-empty follow the original flow-control
// description; raising pause in the same clock as full is this
// implementation's choice, needed so the next scheduling round sees it.
module fcb #(
  parameter int unsigned N = pslip_pkg::N_PORTS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] oq_full,
  input  logic [N-1:0] oq_empty,
  output logic [N-1:0] pause
);

  logic [N-1:0] hold_q;

  always_ff @(posedge clk) begin
    if (rst) hold_q <= '0;
    else     hold_q <= (hold_q | oq_full) & ~oq_empty;
  end

  assign pause = hold_q | oq_full;

endmodule
