// tb_bt_bm: self-checking test of the BM module (matrix + testor decision).
// A 12-column by 20-row pseudo-random matrix is built at elaboration; every one
// of the 4096 candidates is applied and is_testor, the failing row index and
// the row value v are compared with a row-by-row search done here.
module tb_bt_bm;
  localparam int N  = 12;
  localparam int M  = 20;
  localparam int MW = $clog2(M);

  `include "bt_example_matrix.svh"

  localparam logic [M-1:0][N-1:0] ROWS = bt_example_matrix(32'hBEEF_0001, 300);

  logic [N-1:0]  cand, v;
  logic          is_testor;
  logic [MW-1:0] fail_row;
  int            checks = 0, failures = 0, n_testors = 0;

  bt_bm #(.N(N), .M(M), .BM_ROWS(ROWS)) dut (
    .cand(cand), .is_testor(is_testor), .v(v), .fail_row(fail_row)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < (1 << N); c++) begin
      int first;
      first = -1;
      for (int i = 0; i < M; i++)
        if (first < 0 && (ROWS[i] & N'(c)) == '0) first = i;
      cand = N'(c);
      #1;
      checks++;
      if (first < 0) begin
        n_testors++;
        if (!is_testor) begin
          failures++;
          $display("FAIL cand=%h should be a testor", cand);
        end
      end else if (is_testor || int'(fail_row) != first || v !== ROWS[first]) begin
        failures++;
        $display("FAIL cand=%h testor=%b row=%0d v=%h expected row %0d v=%h",
                 cand, is_testor, fail_row, v, first, ROWS[first]);
      end
    end
    // The sweep must have seen both outcomes.
    checks++;
    if (n_testors == 0 || n_testors == (1 << N)) begin
      failures++;
      $display("FAIL degenerate matrix: %0d testors", n_testors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
