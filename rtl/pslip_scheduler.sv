// pslip_scheduler: Prioritized iSLIP (P-iSLIP) scheduler for an N x N
// input-queued switch with virtual output queues and P priority levels.
//
// Request matrix: req_valid[i][j] says input i has a cell for output j;
// req_prio[i][j] is the priority of the highest non-empty queue of input i
// for output j (0..P-1, larger = more urgent). Both are stored on start.
//
// Each iteration (one per clock, N_ITER of them) works on the requests whose
// input and output are both still unmatched:
//   Grant:  each output j (one pslip_arbiter per column) takes the highest
//           priority among its requests and picks one input round-robin with
//           the pointer of that level; the Grant matrix holds one granted
//           input per column, with the requesting priority.
//   Accept: each input i (one pslip_arbiter per row of the Grant matrix)
//           takes the highest granted priority and picks one output
//           round-robin among the grants at that level.
// An accept A[i][j] adds the pair to the matching; row i and column j then
// drop out of the following iterations. Pointers move only in the first
// iteration: an Accept block's pointer on any accept, a Grant block's
// pointer only when its grant was accepted (the iSLIP rule that keeps the
// pointers desynchronised).
//
// Timing: start (while ready) stores the requests; iterations run on the
// next N_ITER clocks; done is high for one clock after that, with match
// valid. ready is also high in the done clock, so a new start there begins
// the next round at once; match stays valid until the clock edge that
// follows the next start. rst synchronous, active
// high.
//
// The matrices, block arrangement and iteration follow the original
// design; one iteration per clock and the pointer-update rule are this
// implementation's choices.
module pslip_scheduler #(
  parameter int unsigned N      = pslip_pkg::N_PORTS,
  parameter int unsigned P      = pslip_pkg::N_PRIO,
  parameter int unsigned N_ITER = pslip_pkg::N_ITER,
  parameter int unsigned IW     = $clog2(N),
  parameter int unsigned PW     = $clog2(P)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  output logic                         ready,
  output logic                         done,
  input  logic [N-1:0][N-1:0]          req_valid,
  input  logic [N-1:0][N-1:0][PW-1:0]  req_prio,
  output logic [N-1:0][N-1:0]          match,
  output logic [N-1:0]                 in_matched,
  output logic [N-1:0][IW-1:0]         in_match_out
);

  localparam int unsigned CW = (N_ITER > 1) ? $clog2(N_ITER) : 1;

  logic iterate, load;
  logic [CW-1:0] iter_idx;

  pslip_controller #(.N_ITER(N_ITER)) u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .ready   (ready),
    .iterate (iterate),
    .load    (load),
    .done    (done),
    .iter_idx(iter_idx)
  );

  // Stored request matrix and the matching built so far.
  logic [N-1:0][N-1:0]         rv_q;
  logic [N-1:0][N-1:0][PW-1:0] rp_q;
  logic [N-1:0][N-1:0]         match_q;
  logic [N-1:0]                row_busy, col_busy;

  // Per-iteration matrices, indexed [input][output].
  logic [N-1:0][N-1:0]         eff;        // live requests
  logic [N-1:0][N-1:0]         grant_m;    // Grant matrix
  logic [N-1:0][N-1:0]         accept_m;   // Accept matrix
  logic [N-1:0][PW-1:0]        grant_prio; // priority granted by output j

  always_comb begin
    for (int i = 0; i < N; i++) row_busy[i] = |match_q[i];
    for (int j = 0; j < N; j++) begin
      col_busy[j] = 1'b0;
      for (int i = 0; i < N; i++) col_busy[j] |= match_q[i][j];
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        eff[i][j] = rv_q[i][j] & ~row_busy[i] & ~col_busy[j];
  end

  // Grant blocks, one per output (column of the request matrix).
  for (genvar j = 0; j < N; j++) begin : g_grant
    logic [N-1:0]         in_list;
    logic [N-1:0][PW-1:0] pr_list;
    logic [N-1:0]         sel;
    logic [IW-1:0]        sel_idx;
    logic                 none;
    logic                 accepted;
    always_comb begin
      for (int i = 0; i < N; i++) begin
        in_list[i] = eff[i][j];
        pr_list[i] = eff[i][j] ? rp_q[i][j] : '0;
      end
      accepted = 1'b0;
      for (int i = 0; i < N; i++) accepted |= accept_m[i][j];
    end
    pslip_arbiter #(.N(N), .P(P), .IW(IW), .PW(PW)) u_grant (
      .clk       (clk),
      .rst       (rst),
      .load      (load && accepted),
      .input_list(in_list),
      .prio_list (pr_list),
      .select    (sel),
      .sel_idx   (sel_idx),
      .sel_prio  (grant_prio[j]),
      .is_there  (none)
    );
    always_comb begin
      for (int i = 0; i < N; i++) grant_m[i][j] = sel[i];
    end
  end

  // Accept blocks, one per input (row of the Grant matrix).
  for (genvar i = 0; i < N; i++) begin : g_accept
    logic [N-1:0][PW-1:0] pr_list;
    logic [IW-1:0]        acc_idx;
    logic [PW-1:0]        acc_prio;
    logic                 none;
    always_comb begin
      for (int j = 0; j < N; j++)
        pr_list[j] = grant_m[i][j] ? grant_prio[j] : '0;
    end
    pslip_arbiter #(.N(N), .P(P), .IW(IW), .PW(PW)) u_accept (
      .clk       (clk),
      .rst       (rst),
      .load      (load),
      .input_list(grant_m[i]),
      .prio_list (pr_list),
      .select    (accept_m[i]),
      .sel_idx   (acc_idx),
      .sel_prio  (acc_prio),
      .is_there  (none)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rv_q    <= '0;
      rp_q    <= '0;
      match_q <= '0;
    end else if (start && ready) begin
      rv_q    <= req_valid;
      rp_q    <= req_prio;
      match_q <= '0;
    end else if (iterate) begin
      match_q <= match_q | accept_m;
    end
  end

  always_comb begin
    match = match_q;
    for (int i = 0; i < N; i++) begin
      in_matched[i]   = row_busy[i];
      in_match_out[i] = '0;
      for (int j = 0; j < N; j++)
        if (match_q[i][j]) in_match_out[i] = IW'(j);
    end
  end

  // The matching is a partial permutation and only pairs requests.
  for (genvar k = 0; k < N; k++) begin : g_chk
    logic [N-1:0] col;
    always_comb for (int i = 0; i < N; i++) col[i] = match_q[i][k];
    a_row : assert property (@(posedge clk) disable iff (rst) $onehot0(match_q[k]));
    a_col : assert property (@(posedge clk) disable iff (rst) $onehot0(col));
    a_req : assert property (@(posedge clk) disable iff (rst)
                             (match_q[k] & ~rv_q[k]) == '0);
  end

endmodule
