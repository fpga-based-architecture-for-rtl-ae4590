// tb_bt_jump2: self-checking test of the non-testor jump (BT step 4).
// The reference follows the definition column by column (column j = bit
// N-j): keep alpha before the last 1 of v, set it, clear what follows.
module tb_bt_jump2;
  localparam int N = 9;
  localparam int NB = 30;

  logic [N-1:0]  cand, v, next;
  logic          v_zero;
  logic [NB-1:0] cand_b, v_b, next_b;
  logic          v_zero_b;
  int            checks = 0, failures = 0;

  bt_jump2 #(.N(N))  dut   (.cand(cand),   .v(v),   .next(next),   .v_zero(v_zero));
  bt_jump2 #(.N(NB)) dut_b (.cand(cand_b), .v(v_b), .next(next_b), .v_zero(v_zero_b));

  // Reference by the column definition, for any width up to 30.
  function automatic logic [NB-1:0] ref_next(int w, logic [NB-1:0] a, logic [NB-1:0] r);
    int k;
    logic [NB-1:0] o;
    k = 0;
    for (int j = 1; j <= w; j++) if (r[w-j]) k = j;  // last 1 of v
    o = '0;
    for (int j = 1; j <= w; j++) begin
      if (j < k)       o[w-j] = a[w-j];
      else if (j == k) o[w-j] = 1'b1;
      else             o[w-j] = 1'b0;
    end
    return o;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: alpha=(011001001), v=(100100000) -> (011100000)
    cand = 9'b011001001; v = 9'b100100000;
    #1;
    checks++;
    if (next !== 9'b011100000 || v_zero) begin
      failures++;
      $display("FAIL worked example next=%b", next);
    end
    // Exhaustive over all disjoint (alpha, v) at N = 9 with v nonzero.
    for (int a = 1; a < (1 << N); a++) begin
      for (int r = 1; r < (1 << N); r += 7) begin
        if ((a & r) != 0) continue;
        cand = N'(a); v = N'(r);
        #1;
        checks++;
        if (next !== N'(ref_next(N, NB'(a), NB'(r))) || v_zero || next <= cand) begin
          failures++;
          $display("FAIL cand=%b v=%b next=%b", cand, v, next);
        end
      end
    end
    // All-zero row.
    cand = 9'b000000101; v = '0;
    #1;
    checks++;
    if (!v_zero) begin failures++; $display("FAIL v_zero not flagged"); end
    // Random at N = 30.
    for (int i = 0; i < 3000; i++) begin
      cand_b = NB'($urandom);
      v_b    = NB'($urandom) & ~cand_b;
      if (v_b == '0) v_b = NB'(1) << ($urandom % NB);
      cand_b = cand_b & ~v_b;
      #1;
      checks++;
      if (next_b !== ref_next(NB, cand_b, v_b) || v_zero_b) begin
        failures++;
        $display("FAIL N=30 cand=%h v=%h next=%h", cand_b, v_b, next_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
