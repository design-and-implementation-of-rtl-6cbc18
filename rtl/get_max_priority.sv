// get_max_priority: maximum-priority finder of a Grant or Accept block.
//
// Takes a list of N priority codes (PW bits each, larger = more urgent) and
// the matching N-bit request-existence list. It returns the largest code in
// the list (max_priority) and the N-bit list of entries that request at that
// code (max_priority_list); any_req is high when the existence list is not
// empty.
//
// For two-bit codes (four levels) the maximum is formed as in the gate-level
// scheme of this design: temp0 = OR of all MSBs gives the MSB; temp1 = OR of
// all LSBs; temp2 = OR over the entries of (MSB AND LSB), i.e. "some entry is
// 11"; the LSB is temp2 OR (temp1 AND NOT temp0). For other code widths a
// generic MSB-first narrowing search is used, which reduces to the same
// equations for two bits. The per-entry selection compares each code with
// the maximum (XOR per bit, NOR of the XORs) and ANDs the result with the
// existence bit.
//
// Requirement on the caller: an entry whose existence bit is 0 must carry
// code 0, so that it can not raise the maximum. This masking is done where
// the lists are formed (in the scheduler), which keeps a gate level out of
// this block. Purely combinational.
//
// The two-bit equations and the per-entry compare follow the original
// gate-level scheme; the generic path for other widths is an addition.
module get_max_priority #(
  parameter int unsigned N  = pslip_pkg::N_PORTS,
  parameter int unsigned PW = $clog2(pslip_pkg::N_PRIO)
) (
  input  logic [N-1:0][PW-1:0] prio_list,
  input  logic [N-1:0]         input_list,
  output logic [PW-1:0]        max_priority,
  output logic [N-1:0]         max_priority_list,
  output logic                 any_req
);

  if (PW == 2) begin : g_two_bit
    logic temp0, temp1, temp2;
    always_comb begin
      temp0 = 1'b0;
      temp1 = 1'b0;
      temp2 = 1'b0;
      for (int i = 0; i < N; i++) begin
        temp0 |= prio_list[i][1];
        temp1 |= prio_list[i][0];
        temp2 |= prio_list[i][1] & prio_list[i][0];
      end
      max_priority[1] = temp0;
      max_priority[0] = temp2 | (temp1 & ~temp0);
    end
  end else begin : g_generic
    always_comb begin
      logic [N-1:0] cand;
      logic [N-1:0] hit;
      cand = input_list;
      for (int b = PW - 1; b >= 0; b--) begin
        for (int i = 0; i < N; i++) hit[i] = cand[i] & prio_list[i][b];
        max_priority[b] = |hit;
        if (|hit) cand = hit;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      max_priority_list[i] = input_list[i] & ~|(prio_list[i] ^ max_priority);
    any_req = |input_list;
  end

endmodule
