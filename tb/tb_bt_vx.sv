// tb_bt_vx: self-checking test of one matrix row's testor test.
// Drives corner candidates (zero, the row itself, its complement, single
// columns) and random ones, and compares is_testor with a bit-by-bit search
// for a column the row and the candidate share.
module tb_bt_vx;
  localparam int           N   = 30;
  localparam logic [N-1:0] ROW = 30'h0A53_C011;

  logic [N-1:0] cand;
  logic         is_testor;
  int           checks = 0, failures = 0;

  bt_vx #(.N(N), .ROW(ROW)) dut (.cand(cand), .is_testor(is_testor));

  function automatic logic ref_pass(logic [N-1:0] c);
    for (int b = 0; b < N; b++) if (ROW[b] && c[b]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(logic [N-1:0] c);
    cand = c;
    #1;
    checks++;
    if (is_testor !== ref_pass(c)) begin
      failures++;
      $display("FAIL cand=%h got %b", c, is_testor);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check(ROW);
    check(~ROW);
    check('1);
    for (int b = 0; b < N; b++) check(N'(1) << b);
    for (int i = 0; i < 2000; i++) check(N'($urandom) & N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
