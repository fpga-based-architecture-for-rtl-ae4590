// tb_bt_full: one complete search with the engine at its default size, 30
// columns by 100 rows, on its default pseudo-random matrix.
//
// The reference numbers below come from an independent program that builds
// the same matrix (same generator, same sorting) and runs the BT loop in
// software: 29,453,407 candidates visited out of 2^30 (2.743 %), 11,215,873
// testors, and a signature, the XOR over all testors t of t * 0x9E3779B97F4A7C15
// (64-bit wrap-around). The first and last matrix rows are checked too, and
// every 4096th testor handed out is checked against all 100 rows here. With
// ready held high the search must take one clock per candidate.
module tb_bt_full;
  localparam int          N            = 30;
  localparam int          M            = 100;
  localparam longint      EXP_CANDS    = 64'd29453407;
  localparam longint      EXP_TESTORS  = 64'd11215873;
  localparam logic [63:0] EXP_SIG      = 64'h3ef7_40e2_b021_359d;
  localparam logic [N-1:0] EXP_ROW0    = 30'h0040_2000;
  localparam logic [N-1:0] EXP_ROWLAST = 30'h1d20_1868;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready = 1'b1;
  logic         busy, done, valid;
  logic [N-1:0] testor;
  logic [N:0]   cand_count, testor_count;

  bt_testor_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .testor_valid(valid), .testor_ready(ready), .testor(testor),
    .cand_count(cand_count), .testor_count(testor_count)
  );

  always #5 clk = ~clk;

  int          checks = 0, failures = 0;
  longint      cycles = 0, n_out = 0;
  logic [63:0] sig = '0;

  initial begin
    // 2^30 clocks would be a full scan without any jump.
    #(64'd11000000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.BM_ROWS[0] !== EXP_ROW0 || dut.BM_ROWS[M-1] !== EXP_ROWLAST) begin
      failures++;
      $display("FAIL default matrix rows %h %h", dut.BM_ROWS[0], dut.BM_ROWS[M-1]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      if (valid) begin
        sig ^= 64'(testor) * 64'h9E37_79B9_7F4A_7C15;
        if (n_out[11:0] == 12'd0) begin
          bit ok;
          ok = 1'b1;
          for (int i = 0; i < M; i++) if ((dut.BM_ROWS[i] & testor) == '0) ok = 1'b0;
          checks++;
          if (!ok) begin failures++; $display("FAIL %h is no testor", testor); end
        end
        n_out++;
      end
      @(negedge clk);
      cycles++;
    end
    checks += 4;
    if (!done) begin failures++; $display("FAIL not done"); end
    if (64'(cand_count) != EXP_CANDS || cycles != EXP_CANDS) begin
      failures++;
      $display("FAIL candidates %0d cycles %0d expected %0d", cand_count, cycles, EXP_CANDS);
    end
    if (64'(testor_count) != EXP_TESTORS || n_out != EXP_TESTORS) begin
      failures++;
      $display("FAIL testors %0d / %0d expected %0d", testor_count, n_out, EXP_TESTORS);
    end
    if (sig != EXP_SIG) begin
      failures++;
      $display("FAIL signature %h expected %h", sig, EXP_SIG);
    end
    $display("searched %0d of %0d candidates (%0d.%03d %%), %0d testors, %0d cycles",
             cand_count, 64'd1 << N, cand_count * 100 / (64'd1 << N),
             (cand_count * 100000 / (64'd1 << N)) % 1000, testor_count, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
