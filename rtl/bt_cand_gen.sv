// bt_cand_gen: candidate generator of the BT testor search.
//
// It holds the current candidate in a register and, from the BM module's
// verdict on it, computes the next one in the same cycle: jump_1 (skip the
// supersets of a testor) when is_testor is 1, jump_2 (skip the tuples the
// failing row v rules out) when it is 0, chosen by a multiplexer. So one
// candidate is evaluated per clock with no added latency.
//
// Control (this design's own choice): start, accepted when not running, loads
// the first tuple (0,...,0,1) and enters ST_RUN. In ST_RUN the register moves
// on at every clock edge where advance is 1 and holds while it is 0 (the
// stall used when a found testor cannot be passed on). The search ends, and
// the generator goes to ST_DONE, when jump_1 carries out of the top bit (the
// next tuple would come after (1,...,1)) or when the failing row is all zero
// (then no tuple at all can be a testor). Reset is synchronous, active low.
//
//   cand       current candidate, meaningful while running is 1
//   running    1 in ST_RUN
//   done       1 in ST_DONE
//   took_jump1 1 when this edge takes a jump_1 step (for statistics)
//   took_jump2 1 when this edge takes a jump_2 step
module bt_cand_gen #(
  parameter int N = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         advance,
  input  logic         is_testor,
  input  logic [N-1:0] v,
  output logic [N-1:0] cand,
  output logic         running,
  output logic         done,
  output logic         took_jump1,
  output logic         took_jump2
);

  import bt_pkg::*;

  bt_state_e    state_q;
  logic [N-1:0] cand_q;
  logic [N-1:0] j1_next, j2_next, next_cand;
  logic         j1_overflow, j2_v_zero, finish;

  bt_jump1 #(.N(N)) u_jump1 (
    .cand     (cand_q),
    .next     (j1_next),
    .overflow (j1_overflow)
  );

  bt_jump2 #(.N(N)) u_jump2 (
    .cand   (cand_q),
    .v      (v),
    .next   (j2_next),
    .v_zero (j2_v_zero)
  );

  // Next-candidate multiplexer, selected by the evaluation result.
  assign next_cand  = is_testor ? j1_next : j2_next;
  assign finish     = is_testor ? j1_overflow : j2_v_zero;
  assign took_jump1 = (state_q == ST_RUN) && advance &&  is_testor;
  assign took_jump2 = (state_q == ST_RUN) && advance && !is_testor;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cand_q  <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state_q <= ST_RUN;
            cand_q  <= N'(1);
          end
        end
        ST_RUN: begin
          if (advance) begin
            if (finish) state_q <= ST_DONE;
            else        cand_q  <= next_cand;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign cand    = cand_q;
  assign running = (state_q == ST_RUN);
  assign done    = (state_q == ST_DONE);

  // BT visits tuples in strictly increasing order.
  property p_increasing;
    @(posedge clk) disable iff (!rst_n)
      (state_q == ST_RUN && advance && !finish) |=> (cand_q > $past(cand_q));
  endproperty
  a_increasing: assert property (p_increasing);

endmodule
