// pslip_pkg: configuration constants shared by the Prioritized iSLIP (P-iSLIP)
// scheduler and the switch fabric around it.
//
// The defaults are the main configuration: a 16x16 switch with four
// priority levels and eight scheduler iterations per cell time, the size the
// scheduler was synthesised at. The cell width and the queue depths are this
// design's own choice; nothing fixes them for the scheduler.
package pslip_pkg;

  // Number of switch ports (inputs = outputs).
  localparam int unsigned N_PORTS   = 16;
  // Number of priority levels (classes of service).
  localparam int unsigned N_PRIO    = 4;
  // P-iSLIP iterations in one scheduling round.
  localparam int unsigned N_ITER    = 8;
  // Payload bits carried per cell (one word per cell).
  localparam int unsigned CELL_W    = 32;
  // Depth of each virtual output queue (per input, per output, per priority).
  localparam int unsigned VOQ_DEPTH = 4;
  // Depth of each class-of-service queue at an output port.
  localparam int unsigned OQ_DEPTH  = 4;

endpackage
