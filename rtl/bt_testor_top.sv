// bt_testor_top: testor search engine for one Boolean basic matrix, running
// the BT (Bottom-Top) algorithm at one candidate per clock.
//
// The BM module tests the current candidate against all M rows at once and,
// when it fails, returns the failing row closest to the top; the candidate
// generator turns that verdict into the next candidate in the same cycle. Each
// candidate found to be a testor is offered on a valid/ready stream. The
// stream carries testors, not only irreducible ones: discarding the reducible
// ones is left to whoever consumes the stream.
//
// Interface (this design's own choice; the structure above follows the BT
// hardware it implements):
//   start         pulse while idle or done: clear the counters, begin at (0,...,0,1)
//   busy / done   search running / finished (done holds until the next start)
//   testor_valid  the current candidate is a testor; testor holds it
//   testor_ready  consumer takes it; while valid and not ready the search stalls
//                 and testor stays stable
//   cand_count    candidates evaluated since start (the c of the BT analysis
//                 is cand_count / 2^N)
//   testor_count  testors handed out since start
// Timing: testor_valid is combinational from the candidate register through
// the BM logic, so it and testor change one cycle after each accepted step.
// With testor_ready held high the search takes exactly cand_count cycles.
// The matrix BM_ROWS (row 0 on top, bit N-1 = column 1) is a constant: a new
// matrix means a new elaboration. Its default is a pseudo-random example of
// the 30-column by 100-row size, built by bt_example_matrix.svh.
module bt_testor_top #(
  parameter int                  N       = 30,
  parameter int                  M       = 100,
  parameter logic [M-1:0][N-1:0] BM_ROWS = bt_example_matrix(32'h0123_4567, 190)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic         testor_valid,
  input  logic         testor_ready,
  output logic [N-1:0] testor,
  output logic [N:0]   cand_count,
  output logic [N:0]   testor_count
);

  `include "bt_example_matrix.svh"

  logic [N-1:0]  cand;
  logic [N-1:0]  v;
  logic          is_testor;
  logic          running;
  logic          advance;
  logic          took_jump1, took_jump2;

  bt_bm #(.N(N), .M(M), .BM_ROWS(BM_ROWS)) u_bm (
    .cand      (cand),
    .is_testor (is_testor),
    .v         (v),
    .fail_row  ()
  );

  bt_cand_gen #(.N(N)) u_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .advance    (advance),
    .is_testor  (is_testor),
    .v          (v),
    .cand       (cand),
    .running    (running),
    .done       (done),
    .took_jump1 (took_jump1),
    .took_jump2 (took_jump2)
  );

  assign testor_valid = running && is_testor;
  assign testor       = cand;
  // Stall only when a testor is offered and not taken.
  assign advance      = !(testor_valid && !testor_ready);
  assign busy         = running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cand_count   <= '0;
      testor_count <= '0;
    end else if (start && !running) begin
      cand_count   <= '0;
      testor_count <= '0;
    end else begin
      if (took_jump1 || took_jump2) cand_count   <= cand_count + 1'b1;
      if (took_jump1)               testor_count <= testor_count + 1'b1;
    end
  end

  // Valid/ready: an offered testor stays offered, unchanged, until taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (testor_valid && !testor_ready) |=> (testor_valid && $stable(testor));
  endproperty
  a_hold: assert property (p_hold);

endmodule
