// bt_jump2: next candidate after a candidate that is NOT a testor (BT step 4).
//
// v is the matrix row, closest to the top, that is all zero on the columns the
// candidate selects. No candidate that keeps the columns before v's last 1 and
// varies only that column and the ones after it can become a testor until the
// column of v's last 1 is selected. So, with k the index of the last 1 of v,
// the next tuple keeps alpha's bits before k, sets bit k and clears every bit
// after it. In bit terms (bit 0 = column N) a priority encoder finds the lowest
// set bit p of v; bits above p are kept, bit p is set, bits below p cleared.
// Since v AND alpha is zero, bit p of alpha is 0 and the result always exceeds
// alpha. Purely combinational. Encoder plus masking follow the BT jump_2 unit;
// the v_zero flag is this design's own addition.
//
//   cand   current candidate
//   v      failing row from the BM module
//   next   jumped candidate
//   v_zero 1 when v has no 1 at all (an all-zero row: no testor can exist)
module bt_jump2 #(
  parameter int  N  = 30,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] cand,
  input  logic [N-1:0] v,
  output logic [N-1:0] next,
  output logic         v_zero
);

  logic [IW-1:0] k_pos;
  logic          found;
  logic [N-1:0]  k_bit;
  logic [N-1:0]  keep_mask;

  bt_prio_enc #(.W(N)) u_last_one (
    .req   (v),
    .idx   (k_pos),
    .found (found)
  );

  assign v_zero    = !found;
  assign k_bit     = N'(1) << k_pos;
  // Ones strictly above bit p: ~((1 << (p+1)) - 1) = ~(k_bit | (k_bit - 1)).
  assign keep_mask = ~(k_bit | (k_bit - N'(1)));
  assign next      = (cand & keep_mask) | k_bit;

endmodule
