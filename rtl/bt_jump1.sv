// bt_jump1: next candidate after a candidate that IS a testor (BT step 3).
//
// Every superset of a testor obtained by adding features after its last 1 is
// also a testor and cannot be irreducible, so the search skips them all: with
// k the index of the last 1 of alpha, the next tuple is alpha + 2^(N-k). In bit
// terms (bit 0 = column N) a priority encoder finds the lowest set bit p and
// the adder adds 1 << p. A carry out of the top bit means the search has gone
// past (1,...,1) and is over. Purely combinational. Encoder plus adder follow
// the BT jump_1 unit; the carry as end-of-search flag is this design's way of
// detecting that the search has passed (1,...,1).
//
//   cand     current candidate (nonzero in use; for zero the output is 1)
//   next     cand + 2^p, truncated to N bits
//   overflow carry out of the addition: no candidate is left
module bt_jump1 #(
  parameter int  N  = 30,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] cand,
  output logic [N-1:0] next,
  output logic         overflow
);

  logic [IW-1:0] k_pos;
  logic          found;
  logic [N:0]    step;

  bt_prio_enc #(.W(N)) u_last_one (
    .req   (cand),
    .idx   (k_pos),
    .found (found)
  );

  // With no 1 in the candidate the step is 1, which yields the first tuple.
  assign step             = (N+1)'(1) << (found ? k_pos : '0);
  assign {overflow, next} = {1'b0, cand} + step;

endmodule
