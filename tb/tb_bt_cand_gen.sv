// tb_bt_cand_gen: self-checking test of the candidate generator.
// The testbench plays the BM module: from a matrix held here it computes
// is_testor and the first failing row for the generator's current candidate.
// The expected candidate sequence is worked out beforehand by a plain loop
// over the BT steps. The generator must produce that sequence one candidate
// per clock, hold its candidate while advance is low, and stop in ST_DONE.
// Two matrices are run: a random one (ends by carry past (1,...,1)) and the
// same one with an all-zero row inserted (ends on the zero row).
module tb_bt_cand_gen;
  localparam int N = 10;
  localparam int M = 16;

  `include "bt_example_matrix.svh"

  localparam logic [M-1:0][N-1:0] ROWS = bt_example_matrix(32'h0000_7777, 280);

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, advance = 1'b1;
  logic         is_testor, running, done, took_jump1, took_jump2;
  logic [N-1:0] v, cand;
  logic [M-1:0][N-1:0] mat;
  int           checks = 0, failures = 0;
  int unsigned  expected [$];

  bt_cand_gen #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .advance(advance),
    .is_testor(is_testor), .v(v), .cand(cand), .running(running), .done(done),
    .took_jump1(took_jump1), .took_jump2(took_jump2)
  );

  always #5 clk = ~clk;

  // Model of the BM module.
  always_comb begin
    is_testor = 1'b1;
    v         = '0;
    for (int i = M - 1; i >= 0; i--)
      if ((mat[i] & cand) == '0) begin
        is_testor = 1'b0;
        v         = mat[i];
      end
  end

  function automatic int first_fail(int unsigned a);
    for (int i = 0; i < M; i++) if ((int'(mat[i]) & int'(a)) == 0) return i;
    return -1;
  endfunction

  // BT by integer arithmetic.
  task automatic build_expected();
    int unsigned a, r, low;
    int f;
    expected.delete();
    a = 1;
    while (a < (1 << N)) begin
      expected.push_back(a);
      f = first_fail(a);
      if (f < 0) begin
        a = a + (a & (~a + 1));
      end else begin
        r = int'(mat[f]);
        if (r == 0) break;
        low = r & (~r + 1);
        a = (a & ~(2 * low - 1)) | low;
      end
    end
  endtask

  task automatic run(int stall_pct);
    int idx, cycles, stalls, j1, j2;
    logic [N-1:0] held;
    build_expected();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    idx = 0; cycles = 0; stalls = 0; j1 = 0; j2 = 0;
    while (running && cycles < 100000) begin
      advance = ($urandom % 100) >= stall_pct;
      checks++;
      if (idx >= expected.size() || cand !== N'(expected[idx])) begin
        failures++;
        $display("FAIL step %0d cand=%b expected %b", idx, cand,
                 idx < expected.size() ? N'(expected[idx]) : N'(0));
      end
      held = cand;
      if (took_jump1) j1++;
      if (took_jump2) j2++;
      @(negedge clk);
      cycles++;
      if (advance) idx++;
      else begin
        stalls++;
        checks++;
        if (cand !== held || !running) begin
          failures++;
          $display("FAIL candidate moved during a stall");
        end
      end
    end
    advance = 1'b1;
    checks++;
    if (!done || idx != expected.size() || cycles != expected.size() + stalls ||
        j1 + j2 != expected.size()) begin
      failures++;
      $display("FAIL end: done=%b steps=%0d expected %0d cycles=%0d stalls=%0d",
               done, idx, expected.size(), cycles, stalls);
    end
    $display("run: %0d candidates (%0d jump_1, %0d jump_2), %0d stalls",
             expected.size(), j1, j2, stalls);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat = ROWS;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (running || done) begin failures++; $display("FAIL not idle after reset"); end
    run(0);
    run(30);
    // All-zero row placed in the middle of the matrix.
    mat[M/2] = '0;
    run(20);
    checks++;
    if (expected[expected.size()-1] == (1 << N) - 1) begin
      failures++;
      $display("FAIL zero-row run did not stop early");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
