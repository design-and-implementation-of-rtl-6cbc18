// ipp_voq: input port processor with its virtual output queues.
//
// An input port keeps one FIFO per output and per priority level
// (N x P queues of VOQ_DEPTH cells), so a cell waiting for a busy output
// never blocks cells for other outputs (no head-of-line blocking).
//
// Arrival: a cell (in_data) with its output (in_dest) and priority (in_prio)
// is written when in_valid and in_ready are both high; in_ready is low when
// the addressed queue is full.
// Request: for every output j, req_valid[j] is high when some queue for j is
// non-empty and j is not paused by flow control; req_prio[j] is the highest
// non-empty priority for j. These form row i of the scheduler's request
// matrix. They describe the queues as they will be after this clock's
// departure (a cell arriving in this clock is not yet counted), because
// the next scheduling round samples them in the clock the cells leave.
// Departure: deq_valid with deq_dest = j pops the head of the highest
// non-empty priority queue for j in that clock; out_data / out_prio show
// that cell combinationally in the same clock (out_valid is high when the
// pop finds a cell).
// rst (synchronous, active high) empties every queue. A queue that is
// written and popped in the same clock keeps its count.
//
// P x N queues per input and highest-priority requests follow the
// original design; queue depth, the handshake and the pause masking of
// requests are this implementation's choices.
module ipp_voq #(
  parameter int unsigned N      = pslip_pkg::N_PORTS,
  parameter int unsigned P      = pslip_pkg::N_PRIO,
  parameter int unsigned CELL_W = pslip_pkg::CELL_W,
  parameter int unsigned DEPTH  = pslip_pkg::VOQ_DEPTH,
  parameter int unsigned IW     = $clog2(N),
  parameter int unsigned PW     = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst,
  // cell arrival
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [CELL_W-1:0]    in_data,
  input  logic [IW-1:0]        in_dest,
  input  logic [PW-1:0]        in_prio,
  // flow control from the FCB
  input  logic [N-1:0]         pause,
  // requests to the scheduler
  output logic [N-1:0]         req_valid,
  output logic [N-1:0][PW-1:0] req_prio,
  // departure toward the crossbar
  input  logic                 deq_valid,
  input  logic [IW-1:0]        deq_dest,
  output logic                 out_valid,
  output logic [CELL_W-1:0]    out_data,
  output logic [PW-1:0]        out_prio
);

  localparam int unsigned Q  = N * P;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CELL_W-1:0] mem [Q][DEPTH];
  logic [AW-1:0]     rd_q [Q];
  logic [AW-1:0]     wr_q [Q];
  logic [CW-1:0]     cnt_q [Q];

  logic [N-1:0]         nonempty;
  logic [N-1:0][PW-1:0] head_prio;
  logic [$clog2(Q)-1:0] wq, rq;
  logic                 wr_en, rd_en;

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + AW'(1);
  endfunction

  // Highest non-empty priority per output, now (for the departure) and
  // after this clock's departure (for the requests).
  logic [N-1:0]         nonempty_nx;
  logic [N-1:0][PW-1:0] head_prio_nx;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      nonempty[j]     = 1'b0;
      head_prio[j]    = '0;
      nonempty_nx[j]  = 1'b0;
      head_prio_nx[j] = '0;
      for (int p = 0; p < P; p++) begin
        if (cnt_q[j * P + p] != '0) begin
          nonempty[j]  = 1'b1;
          head_prio[j] = PW'(p);
        end
        if (cnt_q[j * P + p] > CW'(rd_en && (int'(rq) == j * P + p))) begin
          nonempty_nx[j]  = 1'b1;
          head_prio_nx[j] = PW'(p);
        end
      end
    end
    req_valid = nonempty_nx & ~pause;
    req_prio  = head_prio_nx;
  end

  always_comb begin
    wq       = $bits(wq)'(int'(in_dest) * P + int'(in_prio));
    in_ready = (int'(cnt_q[wq]) != DEPTH);
    wr_en    = in_valid && in_ready;
    rq       = $bits(rq)'(int'(deq_dest) * P + int'(head_prio[deq_dest]));
    rd_en    = deq_valid && nonempty[deq_dest];
    out_valid = deq_valid && nonempty[deq_dest];
    out_data  = mem[rq][rd_q[rq]];
    out_prio  = head_prio[deq_dest];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int q = 0; q < Q; q++) begin
        rd_q[q]  <= '0;
        wr_q[q]  <= '0;
        cnt_q[q] <= '0;
      end
    end else begin
      if (wr_en) wr_q[wq] <= bump(wr_q[wq]);
      if (rd_en) rd_q[rq] <= bump(rd_q[rq]);
      if (wr_en && !(rd_en && rq == wq)) cnt_q[wq] <= cnt_q[wq] + CW'(1);
      if (rd_en && !(wr_en && rq == wq)) cnt_q[rq] <= cnt_q[rq] - CW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wq][wr_q[wq]] <= in_data;
  end

  a_deq_nonempty : assert property (@(posedge clk) disable iff (rst)
                                    deq_valid |-> nonempty[deq_dest]);

endmodule
