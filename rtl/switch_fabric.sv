// switch_fabric: N-port input-queued switch fabric scheduled by P-iSLIP.
//
// Data path per cell time: cells from the network processors enter the
// input ports (ipp_voq), where each waits in the virtual output queue of its
// output and priority. The P-iSLIP scheduler (pslip_scheduler) matches
// inputs to outputs from the queues' requests; each matched input then
// sends the head cell of its queue for the matched output through the
// crossbar into that output's class-of-service queues (oq_opp), which
// deliver to the network processor by strict priority. The flow-control
// broadcast (fcb) pauses all requests toward an output whose queue filled
// up, until it has drained.
//
// Cell time: the fabric keeps the scheduler busy. The request matrix is
// sampled at the start of a round and N_ITER iterations follow. In the
// clock where the scheduler reports done, the matched cells are popped,
// cross the crossbar and are written into the output queues, and in that
// same clock the next round starts, sampling the queues and the flow
// control as they will be after this transfer. One cell time is therefore
// N_ITER + 1 clocks, and each input and each output moves at most one cell
// per cell time.
//
// Ports: per input port i a valid/ready cell interface (in_*), with the
// destination port and priority beside the payload; per output port j a
// valid/ready cell interface toward the network processor (out_*). The
// physical cell interface to the network processor (a CSIX link) is not
// modelled; these plain handshakes stand in its place. sched_done and
// sched_match expose the scheduler's result for observation.
// rst is synchronous, active high.
//
// The block set follows the original fabric architecture; the cell-time
// sequencing, cell format and port handshakes are this implementation's.
module switch_fabric #(
  parameter int unsigned N         = pslip_pkg::N_PORTS,
  parameter int unsigned P         = pslip_pkg::N_PRIO,
  parameter int unsigned N_ITER    = pslip_pkg::N_ITER,
  parameter int unsigned CELL_W    = pslip_pkg::CELL_W,
  parameter int unsigned VOQ_DEPTH = pslip_pkg::VOQ_DEPTH,
  parameter int unsigned OQ_DEPTH  = pslip_pkg::OQ_DEPTH,
  parameter int unsigned IW        = $clog2(N),
  parameter int unsigned PW        = $clog2(P)
) (
  input  logic                         clk,
  input  logic                         rst,
  // input ports
  input  logic [N-1:0]                 in_valid,
  output logic [N-1:0]                 in_ready,
  input  logic [N-1:0][CELL_W-1:0]     in_data,
  input  logic [N-1:0][IW-1:0]         in_dest,
  input  logic [N-1:0][PW-1:0]         in_prio,
  // output ports
  output logic [N-1:0]                 out_valid,
  input  logic [N-1:0]                 out_ready,
  output logic [N-1:0][CELL_W-1:0]     out_data,
  output logic [N-1:0][PW-1:0]         out_prio,
  // observation
  output logic                         sched_done,
  output logic [N-1:0][N-1:0]          sched_match,
  output logic [N-1:0]                 fc_pause
);

  localparam int unsigned XW = CELL_W + PW;  // crossbar word: priority + payload

  logic                        sched_ready, sched_start;
  logic [N-1:0][N-1:0]         req_valid;
  logic [N-1:0][N-1:0][PW-1:0] req_prio;
  logic [N-1:0]                in_matched;
  logic [N-1:0][IW-1:0]        in_match_out;

  logic [N-1:0]                deq_valid;
  logic [N-1:0]                voq_out_valid;
  logic [N-1:0][CELL_W-1:0]    voq_out_data;
  logic [N-1:0][PW-1:0]        voq_out_prio;
  logic [N-1:0][XW-1:0]        xin_data, xout_data;
  logic [N-1:0]                xout_valid;
  logic [N-1:0]                oq_full, oq_empty, pause;

  for (genvar i = 0; i < N; i++) begin : g_in
    ipp_voq #(.N(N), .P(P), .CELL_W(CELL_W), .DEPTH(VOQ_DEPTH), .IW(IW), .PW(PW)) u_ipp (
      .clk      (clk),
      .rst      (rst),
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_data[i]),
      .in_dest  (in_dest[i]),
      .in_prio  (in_prio[i]),
      .pause    (pause),
      .req_valid(req_valid[i]),
      .req_prio (req_prio[i]),
      .deq_valid(deq_valid[i]),
      .deq_dest (in_match_out[i]),
      .out_valid(voq_out_valid[i]),
      .out_data (voq_out_data[i]),
      .out_prio (voq_out_prio[i])
    );
    assign deq_valid[i] = sched_done && in_matched[i];
    assign xin_data[i]  = {voq_out_prio[i], voq_out_data[i]};
  end

  // A new scheduling round whenever the scheduler can take one, including
  // the done clock of the previous round.
  assign sched_start = sched_ready && !rst;

  pslip_scheduler #(.N(N), .P(P), .N_ITER(N_ITER), .IW(IW), .PW(PW)) u_sched (
    .clk         (clk),
    .rst         (rst),
    .start       (sched_start),
    .ready       (sched_ready),
    .done        (sched_done),
    .req_valid   (req_valid),
    .req_prio    (req_prio),
    .match       (sched_match),
    .in_matched  (in_matched),
    .in_match_out(in_match_out)
  );

  crossbar #(.N(N), .W(XW)) u_xbar (
    .match    (sched_match),
    .in_valid (voq_out_valid),
    .in_data  (xin_data),
    .out_valid(xout_valid),
    .out_data (xout_data)
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    oq_opp #(.P(P), .CELL_W(CELL_W), .DEPTH(OQ_DEPTH), .PW(PW)) u_opp (
      .clk      (clk),
      .rst      (rst),
      .in_valid (xout_valid[j]),
      .in_data  (xout_data[j][CELL_W-1:0]),
      .in_prio  (xout_data[j][XW-1:CELL_W]),
      .out_valid(out_valid[j]),
      .out_ready(out_ready[j]),
      .out_data (out_data[j]),
      .out_prio (out_prio[j]),
      .full     (oq_full[j]),
      .empty    (oq_empty[j])
    );
  end

  fcb #(.N(N)) u_fcb (
    .clk     (clk),
    .rst     (rst),
    .oq_full (oq_full),
    .oq_empty(oq_empty),
    .pause   (pause)
  );

  assign fc_pause = pause;

endmodule
