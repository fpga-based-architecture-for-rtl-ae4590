// bt_vx: one row of the basic matrix together with its testor test (a "V_x"
// sub-module of the BM module).
//
// The row is a constant fixed at elaboration: changing the matrix means
// rebuilding the design, and no flip-flops hold it. The candidate passes this
// row when it selects at least one column in which the row has a 1, i.e. when
// the bitwise AND of row and candidate is not all zero. Purely combinational.
// Structure and function are those of the BT row cell; the all-ones default
// ROW is only a placeholder, since the BM module always sets it.
//
//   cand      candidate N-tuple (bit N-1 = column 1)
//   is_testor 1 when the candidate is not all zero on this row's ones
module bt_vx #(
  parameter int           N   = 30,
  parameter logic [N-1:0] ROW = '1
) (
  input  logic [N-1:0] cand,
  output logic         is_testor
);

  assign is_testor = |(ROW & cand);

endmodule
