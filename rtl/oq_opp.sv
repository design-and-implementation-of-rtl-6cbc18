// oq_opp: output port processor with its output queue.
//
// Cells arriving from the crossbar (in_valid, in_data, in_prio) are stored
// in one class-of-service FIFO per priority level (P queues of DEPTH
// cells). Toward the network processor the port sends one cell per clock
// with a valid/ready handshake, always from the highest-priority non-empty
// queue (strict priority). full is high when a class queue is full or is
// being filled up by the cell written in this clock (a departure in the
// same clock is not credited), the occupancy the flow-control broadcast
// reacts to; empty is high when all class queues are empty. Writing into a full queue is an error (the flow
// control upstream prevents it; an assertion checks it) and the cell is
// dropped. rst (synchronous, active high) empties the queues.
//
// Class-of-service queues and strict priority follow the original output
// port description; its weighted round robin is not implemented because its
// weights are not specified. Depths and the handshake are own choices.
module oq_opp #(
  parameter int unsigned P      = pslip_pkg::N_PRIO,
  parameter int unsigned CELL_W = pslip_pkg::CELL_W,
  parameter int unsigned DEPTH  = pslip_pkg::OQ_DEPTH,
  parameter int unsigned PW     = $clog2(P)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [CELL_W-1:0] in_data,
  input  logic [PW-1:0]     in_prio,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CELL_W-1:0] out_data,
  output logic [PW-1:0]     out_prio,
  output logic              full,
  output logic              empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CELL_W-1:0] mem [P][DEPTH];
  logic [AW-1:0]     rd_q [P];
  logic [AW-1:0]     wr_q [P];
  logic [CW-1:0]     cnt_q [P];
  logic              wr_en, rd_en;
  logic [PW-1:0]     rp;

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + AW'(1);
  endfunction

  always_comb begin
    full      = 1'b0;
    out_valid = 1'b0;
    rp        = '0;
    for (int p = 0; p < P; p++) begin
      if (int'(cnt_q[p]) == DEPTH ||
          (in_valid && int'(in_prio) == p && int'(cnt_q[p]) == DEPTH - 1))
        full = 1'b1;
      if (cnt_q[p] != '0) begin
        out_valid = 1'b1;
        rp        = PW'(p);
      end
    end
    empty    = ~out_valid;
    out_prio = rp;
    out_data = mem[rp][rd_q[rp]];
    rd_en    = out_valid && out_ready;
    wr_en    = in_valid && (int'(cnt_q[in_prio]) != DEPTH);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < P; p++) begin
        rd_q[p]  <= '0;
        wr_q[p]  <= '0;
        cnt_q[p] <= '0;
      end
    end else begin
      if (wr_en) wr_q[in_prio] <= bump(wr_q[in_prio]);
      if (rd_en) rd_q[rp]      <= bump(rd_q[rp]);
      if (wr_en && !(rd_en && rp == in_prio)) cnt_q[in_prio] <= cnt_q[in_prio] + CW'(1);
      if (rd_en && !(wr_en && rp == in_prio)) cnt_q[rp]      <= cnt_q[rp] - CW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[in_prio][wr_q[in_prio]] <= in_data;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (rst)
                                   in_valid |-> int'(cnt_q[in_prio]) != DEPTH);

endmodule
