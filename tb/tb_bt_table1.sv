// tb_bt_table1: complete searches on the matrix sizes of the processing-time
// study, 20 to 29 columns by 100 rows (the 30 x 100 case is tb_bt_full).
//
// One engine per size, each on its own pseudo-random matrix from
// bt_example_matrix (same seed and density as the default matrix), all started
// together. The expected numbers of candidates and testors and the testor
// signatures come from an independent software run of the BT loop on the same
// matrices; tb_bt_engine_run holds the checks.
//
// A further engine, at the default 30 columns, is given the 20-column matrix
// padded with ten all-zero columns on the right. Such columns never enter an
// irreducible testor: the first candidate sits on one, fails on the top row
// and jumps straight past all of them, after which no step lands on one again.
// So it must find the same testors, none using a zero column; the reference
// run of the padded matrix visits 7463 candidates, as the 20-column one does.
// This shows a 30 x 100 engine can run every matrix of the study.
module tb_bt_table1;
  localparam int M  = 100;
  localparam int NS = 10;  // sizes 20 .. 29

  localparam longint      EXP_C [NS] = '{64'd7463, 64'd48961, 64'd40978, 64'd105855, 64'd205247,
                                         64'd221979, 64'd3182299, 64'd6249109, 64'd5576795, 64'd12496598};
  localparam longint      EXP_T [NS] = '{64'd1909, 64'd6592, 64'd5316, 64'd27744, 64'd67422,
                                         64'd74932, 64'd1113285, 64'd2100794, 64'd1670854, 64'd4603377};
  localparam logic [63:0] EXP_S [NS] = '{64'hf4f44563d96c9708, 64'hc201c8934632e41d, 64'h02097d94afc10c20,
                                         64'h9df77dc3ca040788, 64'hef8f3009b801c599, 64'h1f2e35eb52536eb5,
                                         64'h46c83657b1c39af4, 64'had00d7afc8772079, 64'h789c5655f516ea93,
                                         64'h7b94752acc6f5641};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [NS:0] fin;
  int          ch [NS+1];
  int          fl [NS+1];
  int          checks, failures;

  for (genvar g = 0; g < NS; g++) begin : g_size
    tb_bt_engine_run #(.N(20 + g), .M(M), .PAD(0), .EXP_C(EXP_C[g]), .EXP_T(EXP_T[g]),
                       .EXP_S(EXP_S[g])) u_run (
      .clk(clk), .rst_n(rst_n), .start(start), .fin(fin[g]), .checks(ch[g]), .failures(fl[g])
    );
  end

  tb_bt_engine_run #(.N(20), .M(M), .PAD(10), .EXP_C(EXP_C[0]), .EXP_T(EXP_T[0]),
                     .EXP_S(EXP_S[0])) u_pad (
    .clk(clk), .rst_n(rst_n), .start(start), .fin(fin[NS]), .checks(ch[NS]), .failures(fl[NS])
  );

  function automatic void tally();
    checks = 0; failures = 0;
    for (int i = 0; i <= NS; i++) begin checks += ch[i]; failures += fl[i]; end
  endfunction

  initial begin
    #(64'd200000000);
    tally();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (&fin);
    tally();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
