// bt_bm: the BM module, which holds the basic matrix and decides in one
// combinational pass whether a candidate is a testor of it.
//
// It is M bt_vx rows side by side. The candidate is a testor when every row
// passes. When it is not, a priority encoder finds the failing row closest to
// the top (lowest row index) and its index drives a multiplexer over the
// constant rows, much like the read port of a register file; that row value is
// output as v for the candidate generator. v is meaningless when is_testor is
// 1. The matrix is the parameter BM_ROWS (row 0 on top, bit N-1 of a row =
// column 1); its default is the pseudo-random example of bt_example_matrix.svh
// at the 30 x 100 size. The row-fail index is brought out as well, as a
// debugging aid, an addition of this design. No clock: the result is valid in
// the cycle the candidate is. Rows, AND tree, encoder and row multiplexer
// follow the BT hardware this implements.
module bt_bm #(
  parameter int                  N       = 30,
  parameter int                  M       = 100,
  parameter logic [M-1:0][N-1:0] BM_ROWS = bt_example_matrix(32'h0123_4567, 190),
  localparam int                 MW      = (M > 1) ? $clog2(M) : 1
) (
  input  logic [N-1:0]  cand,
  output logic          is_testor,
  output logic [N-1:0]  v,
  output logic [MW-1:0] fail_row
);

  `include "bt_example_matrix.svh"

  logic [M-1:0] row_ok;
  logic         any_fail;

  for (genvar i = 0; i < M; i++) begin : g_row
    bt_vx #(.N(N), .ROW(BM_ROWS[i])) u_vx (
      .cand      (cand),
      .is_testor (row_ok[i])
    );
  end

  assign is_testor = &row_ok;

  // The encoder finds a failing row exactly when the candidate is no testor.
  always_comb assert (any_fail == !is_testor);

  bt_prio_enc #(.W(M)) u_first_fail (
    .req   (~row_ok),
    .idx   (fail_row),
    .found (any_fail)
  );

  // Row multiplexer selected by the priority encoder.
  always_comb begin
    v = '0;
    for (int i = 0; i < M; i++)
      if (fail_row == MW'(i)) v = BM_ROWS[i];
  end

endmodule
