// tb_bt_testor_top: end-to-end test of the testor search engine.
//
// Two engines at N = 12 columns, M = 24 rows: one on a pseudo-random matrix,
// one on a matrix with an all-zero row. For each, every one of the 2^N tuples
// is first classified by brute force here (testor or not, irreducible or not).
// The engine's stream must then hold only testors, in strictly increasing
// order, and include every irreducible testor; keeping the irreducible ones
// of the stream must give exactly the brute-force set. cand_count must equal
// the number of tuples a plain BT loop visits, and the run must take one clock
// per candidate plus one per stall. The consumer's ready is dropped at random
// in one run and held high in a restarted run. Counted mechanisms: jump_1
// steps, jump_2 steps, stalls, end by carry past (1,...,1), end on an all-zero
// row, restart; each must occur.
module tb_bt_testor_top;
  localparam int N = 12;
  localparam int M = 24;

  `include "bt_example_matrix.svh"

  function automatic logic [M-1:0][N-1:0] with_zero_row(logic [M-1:0][N-1:0] r, int at);
    r[at] = '0;
    return r;
  endfunction

  localparam logic [M-1:0][N-1:0] ROWS_A = bt_example_matrix(32'h00C0_FFEE, 260);
  localparam logic [M-1:0][N-1:0] ROWS_B = with_zero_row(bt_example_matrix(32'h0000_0BAD, 300), 17);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start [2];
  logic ready [2];
  logic busy [2], done [2], valid [2];
  logic [N-1:0] testor [2];
  logic [N:0]   cand_count [2], testor_count [2];

  bt_testor_top #(.N(N), .M(M), .BM_ROWS(ROWS_A)) dut_a (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .busy(busy[0]), .done(done[0]),
    .testor_valid(valid[0]), .testor_ready(ready[0]), .testor(testor[0]),
    .cand_count(cand_count[0]), .testor_count(testor_count[0])
  );

  bt_testor_top #(.N(N), .M(M), .BM_ROWS(ROWS_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .busy(busy[1]), .done(done[1]),
    .testor_valid(valid[1]), .testor_ready(ready[1]), .testor(testor[1]),
    .cand_count(cand_count[1]), .testor_count(testor_count[1])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_jump1 = 0, n_jump2 = 0, n_stall = 0, n_end_carry = 0, n_end_zero = 0, n_restart = 0;

  bit is_t  [1 << N];
  bit is_it [1 << N];

  task automatic classify(logic [M-1:0][N-1:0] rows);
    for (int a = 0; a < (1 << N); a++) begin
      is_t[a] = 1'b1;
      for (int i = 0; i < M; i++) if ((rows[i] & N'(a)) == '0) is_t[a] = 1'b0;
    end
    for (int a = 0; a < (1 << N); a++) begin
      is_it[a] = is_t[a];
      for (int b = 0; b < N; b++) if (a[b] && is_t[a & ~(1 << b)]) is_it[a] = 1'b0;
    end
  endtask

  function automatic int bt_visits(logic [M-1:0][N-1:0] rows, output bit ended_zero);
    int unsigned a, r, low;
    int n, f;
    a = 1; n = 0; ended_zero = 1'b0;
    while (a < (1 << N)) begin
      n++;
      f = -1;
      for (int i = 0; i < M; i++) if (f < 0 && (rows[i] & N'(a)) == '0) f = i;
      if (f < 0) a = a + (a & (~a + 1));
      else begin
        r = int'(rows[f]);
        if (r == 0) begin ended_zero = 1'b1; break; end
        low = r & (~r + 1);
        a = (a & ~(2 * low - 1)) | low;
      end
    end
    return n;
  endfunction

  task automatic run(int d, logic [M-1:0][N-1:0] rows, int stall_pct, bit restart);
    int cycles, stalls, n_out, last, expect_cands;
    bit ended_zero, last_was_jump1, seen [1 << N];
    classify(rows);
    expect_cands = bt_visits(rows, ended_zero);
    foreach (seen[a]) seen[a] = 1'b0;
    @(negedge clk);
    checks++;
    if (restart != done[d]) begin failures++; $display("FAIL done before start"); end
    if (restart) n_restart++;
    start[d] = 1'b1;
    @(negedge clk);
    start[d] = 1'b0;
    cycles = 0; stalls = 0; n_out = 0; last = 0; last_was_jump1 = 1'b0;
    while (busy[d] && cycles < 200000) begin
      ready[d] = ($urandom % 100) >= stall_pct;
      #1;
      if (valid[d]) begin
        if (ready[d]) begin
          checks++;
          if (!is_t[testor[d]] || int'(testor[d]) <= last) begin
            failures++;
            $display("FAIL engine %0d: %b is no testor or out of order", d, testor[d]);
          end
          seen[testor[d]] = 1'b1;
          last = int'(testor[d]);
          n_out++;
          n_jump1++;
          last_was_jump1 = 1'b1;
        end else begin
          stalls++;
          n_stall++;
        end
      end else begin
        n_jump2++;
        last_was_jump1 = 1'b0;
      end
      @(negedge clk);
      cycles++;
    end
    ready[d] = 1'b1;
    // Every irreducible testor found, and nothing else is irreducible.
    for (int a = 1; a < (1 << N); a++) begin
      if (is_it[a]) begin
        checks++;
        if (!seen[a]) begin failures++; $display("FAIL engine %0d missed irreducible %b", d, N'(a)); end
      end
      if (seen[a] && !is_it[a]) begin
        bit reducible;
        reducible = 1'b0;
        for (int b = 0; b < N; b++) if (a[b] && is_t[a & ~(1 << b)]) reducible = 1'b1;
        checks++;
        if (!reducible) begin failures++; $display("FAIL engine %0d: %b classified wrongly", d, N'(a)); end
      end
    end
    checks++;
    if (!done[d] || int'(cand_count[d]) != expect_cands || int'(testor_count[d]) != n_out ||
        cycles != expect_cands + stalls) begin
      failures++;
      $display("FAIL engine %0d end: done=%b cands=%0d expected %0d testors=%0d/%0d cycles=%0d stalls=%0d",
               d, done[d], cand_count[d], expect_cands, testor_count[d], n_out, cycles, stalls);
    end
    if (ended_zero) n_end_zero++;
    else if (last_was_jump1) n_end_carry++;
    $display("engine %0d: %0d candidates of %0d (%0d testors), %0d stalls, %0d cycles",
             d, expect_cands, 1 << N, n_out, stalls, cycles);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = '{1'b0, 1'b0};
    ready = '{1'b1, 1'b1};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, ROWS_A, 35, 1'b0);
    run(0, ROWS_A, 0, 1'b1);
    run(1, ROWS_B, 25, 1'b0);
    checks += 6;
    if (n_jump1 == 0)     begin failures++; $display("FAIL no jump_1 step"); end
    if (n_jump2 == 0)     begin failures++; $display("FAIL no jump_2 step"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no stall"); end
    if (n_end_carry == 0) begin failures++; $display("FAIL no end by carry"); end
    if (n_end_zero == 0)  begin failures++; $display("FAIL no end on zero row"); end
    if (n_restart == 0)   begin failures++; $display("FAIL no restart"); end
    $display("mechanisms: jump_1=%0d jump_2=%0d stall=%0d end_carry=%0d end_zero_row=%0d restart=%0d",
             n_jump1, n_jump2, n_stall, n_end_carry, n_end_zero, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
