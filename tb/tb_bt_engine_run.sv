// tb_bt_engine_run: testbench helper that runs one complete search on one
// engine and checks it against reference numbers.
//
// The engine is N + PAD columns wide and M rows deep. Its matrix is the
// bt_example_matrix of N columns (given seed and density), with PAD all-zero
// columns appended on the right. After start it follows the testor stream
// (ready held high) to the end and compares: candidates visited (EXP_C),
// testors (EXP_T), the signature (XOR over testors t, zero columns removed,
// of t * 0x9E3779B97F4A7C15) and one clock per candidate. No testor may use
// a zero column. fin rises when the check is complete.
module tb_bt_engine_run #(
  parameter int          N      = 20,
  parameter int          M      = 100,
  parameter int          PAD    = 0,
  parameter logic [31:0] SEED   = 32'h0123_4567,
  parameter int unsigned THRESH = 190,
  parameter longint      EXP_C  = 0,
  parameter longint      EXP_T  = 0,
  parameter logic [63:0] EXP_S  = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int W = N + PAD;

  `include "bt_example_matrix.svh"

  function automatic logic [M-1:0][W-1:0] padded(logic [M-1:0][N-1:0] r);
    logic [M-1:0][W-1:0] o;
    for (int i = 0; i < M; i++) o[i] = W'(r[i]) << PAD;
    return o;
  endfunction

  localparam logic [M-1:0][W-1:0] ROWS = padded(bt_example_matrix(SEED, THRESH));
  localparam longint              EXP_CANDS = EXP_C;

  logic         busy, done, valid;
  logic [W-1:0] testor;
  logic [W:0]   cand_count, testor_count;
  longint       cycles;
  logic [63:0]  sig;

  bt_testor_top #(.N(W), .M(M), .BM_ROWS(ROWS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .testor_valid(valid), .testor_ready(1'b1), .testor(testor),
    .cand_count(cand_count), .testor_count(testor_count)
  );

  initial begin
    fin = 1'b0; checks = 0; failures = 0; cycles = 0; sig = '0;
    wait (rst_n && start);
    @(posedge clk);
    @(negedge clk);
    while (busy) begin
      if (valid) begin
        if (PAD > 0 && (testor & ((W'(1) << PAD) - W'(1))) != '0) begin
          checks++;
          failures++;
          $display("FAIL %0dx%0d: testor %h uses a zero column", W, M, testor);
        end
        sig ^= 64'(testor >> PAD) * 64'h9E37_79B9_7F4A_7C15;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (!done || 64'(cand_count) != EXP_CANDS || cycles != EXP_CANDS ||
        64'(testor_count) != EXP_T || sig != EXP_S) begin
      failures++;
      $display("FAIL %0d(+%0d)x%0d: cands=%0d cycles=%0d testors=%0d sig=%h", N, PAD, M,
               cand_count, cycles, testor_count, sig);
    end
    $display("%0d columns (+%0d zero) x %0d rows: %0d candidates (%0d.%02d %% of 2^%0d), %0d testors, %0d us at 50 MHz",
             N, PAD, M, cand_count, cand_count * 100 / (64'd1 << W),
             (cand_count * 10000 / (64'd1 << W)) % 100, W, testor_count, cand_count / 50);
    fin = 1'b1;
  end
endmodule
