// pslip_arbiter: one Grant block (one per output) or Accept block (one per
// input) of the P-iSLIP scheduler. Both steps of the algorithm do the same
// thing on different lists, so one module serves both.
//
// Structure: get_max_priority finds the highest priority code among the
// requests (input_list / prio_list) and the requests that carry it; that
// code selects one of P round-robin pointers (priority_pointers);
// rr_arbitration picks the first such request at or after the pointer. The
// choice is given as a one-hot vector (select, through a log2(N)-to-N
// decoder), as an index (sel_idx) and with its priority (sel_prio, which the
// Grant step passes on to the Accept step). The pointer of that level is
// reloaded with the chosen index plus one (mod N) on a clock edge where
// load is high and there was a request (is_there low). The caller decides
// when load is given: the scheduler gives it in the first iteration only,
// and to a Grant block only if its grant was accepted.
//
// Lists: input_list bit k says port k requests (or granted); prio_list[k]
// is its priority, and must be 0 where input_list[k] is 0. Selection is
// combinational; only the pointers are clocked (rst synchronous, active
// high, sets every pointer to port 0).
//
// The block structure follows the original Grant/Accept design; when load
// is given is this implementation's reading (the iSLIP rule).
module pslip_arbiter #(
  parameter int unsigned N  = pslip_pkg::N_PORTS,
  parameter int unsigned P  = pslip_pkg::N_PRIO,
  parameter int unsigned IW = $clog2(N),
  parameter int unsigned PW = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [N-1:0]         input_list,
  input  logic [N-1:0][PW-1:0] prio_list,
  output logic [N-1:0]         select,
  output logic [IW-1:0]        sel_idx,
  output logic [PW-1:0]        sel_prio,
  output logic                 is_there
);

  logic [N-1:0]  max_list;
  logic          any_req;
  logic [IW-1:0] ptr;
  logic [IW-1:0] next_ptr;

  get_max_priority #(.N(N), .PW(PW)) u_max (
    .prio_list        (prio_list),
    .input_list       (input_list),
    .max_priority     (sel_prio),
    .max_priority_list(max_list),
    .any_req          (any_req)
  );

  priority_pointers #(.N(N), .P(P), .IW(IW), .PW(PW)) u_ptrs (
    .clk     (clk),
    .rst     (rst),
    .load    (load && !is_there),
    .level   (sel_prio),
    .next_ptr(next_ptr),
    .ptr     (ptr)
  );

  rr_arbitration #(.N(N), .IW(IW)) u_arb (
    .req_list(max_list),
    .ptr     (ptr),
    .sel     (sel_idx),
    .is_there(is_there)
  );

  // "+1" on the chosen port, wrapping at N.
  always_comb begin
    if (int'(sel_idx) == N - 1) next_ptr = '0;
    else                        next_ptr = sel_idx + IW'(1);
  end

  // log2(N)-to-N decoder of the chosen port.
  always_comb begin
    select = '0;
    if (!is_there) select[sel_idx] = 1'b1;
  end

  // Lists must be pre-masked: a port without a request carries priority 0.
  for (genvar k = 0; k < N; k++) begin : g_chk
    a_masked : assert property (@(posedge clk) disable iff (rst)
                                !input_list[k] |-> prio_list[k] == '0);
  end

  // Whenever a request exists, exactly one port is selected.
  a_onehot : assert property (@(posedge clk) disable iff (rst)
                              any_req |-> $onehot(select));

endmodule
