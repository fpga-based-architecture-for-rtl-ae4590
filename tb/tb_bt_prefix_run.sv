// tb_bt_prefix_run: testbench helper that runs the first STEPS candidates of
// a search too long to finish in simulation and checks each one.
//
// The engine is N columns by M rows on bt_example_matrix(SEED, THRESH). A
// reference model here keeps its own current tuple and applies the BT steps
// with plain loops over rows and columns. At every clock the engine's current
// candidate must equal the model's, testor_valid must equal the model's
// verdict and, for a testor, the streamed value must be the candidate.
// Counts of testor and non-testor steps are reported; fin rises when done.
module tb_bt_prefix_run #(
  parameter int          N      = 100,
  parameter int          M      = 100,
  parameter logic [31:0] SEED   = 32'h0123_4567,
  parameter int unsigned THRESH = 190,
  parameter int          STEPS  = 20000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic fin,
  output int   checks,
  output int   failures
);
  `include "bt_example_matrix.svh"

  localparam logic [M-1:0][N-1:0] ROWS = bt_example_matrix(SEED, THRESH);

  logic         busy, done, valid;
  logic [N-1:0] testor;
  logic [N:0]   cand_count, testor_count;
  logic [N-1:0] a;
  int           n_t, n_f;

  bt_testor_top #(.N(N), .M(M), .BM_ROWS(ROWS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .testor_valid(valid), .testor_ready(1'b1), .testor(testor),
    .cand_count(cand_count), .testor_count(testor_count)
  );

  initial begin
    int f, k;
    fin = 1'b0; checks = 0; failures = 0; n_t = 0; n_f = 0;
    a = N'(1);
    wait (rst_n && start);
    @(posedge clk);
    @(negedge clk);
    for (int s = 0; s < STEPS && busy; s++) begin
      f = -1;
      for (int i = 0; i < M; i++) if (f < 0 && (ROWS[i] & a) == '0) f = i;
      checks++;
      if (dut.u_gen.cand !== a || valid !== (f < 0) || (f < 0 && testor !== a)) begin
        failures++;
        if (failures < 5)
          $display("FAIL %0dx%0d step %0d: cand=%h expected %h valid=%b", N, M, s,
                   dut.u_gen.cand, a, valid);
      end
      if (f < 0) begin
        n_t++;
        k = 0;
        while (!a[k]) k++;                  // column N-k holds the last 1
        a = a + (N'(1) << k);
      end else begin
        n_f++;
        k = 0;
        while (!ROWS[f][k]) k++;
        for (int j = 0; j < k; j++) a[j] = 1'b0;
        a[k] = 1'b1;
      end
      @(negedge clk);
    end
    checks++;
    if (64'(cand_count) != 64'(STEPS) || 64'(testor_count) != 64'(n_t)) begin
      failures++;
      $display("FAIL %0dx%0d: counters %0d %0d", N, M, cand_count, testor_count);
    end
    $display("%0d columns x %0d rows: first %0d candidates checked (%0d testors, %0d jumps over non-testors)",
             N, M, STEPS, n_t, n_f);
    fin = 1'b1;
  end
endmodule
