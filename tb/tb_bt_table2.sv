// tb_bt_table2: the large matrices of the resource study, 100 columns by 100,
// 150, 200, 250 and 300 rows. A full search over 2^100 tuples cannot finish,
// so each engine runs its first 200,000 candidates, checked one by one against
// a reference model of the BT steps (see tb_bt_prefix_run).
module tb_bt_table2;
  localparam int NS = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [NS-1:0] fin;
  int            ch [NS];
  int            fl [NS];
  int            checks, failures;

  for (genvar g = 0; g < NS; g++) begin : g_size
    tb_bt_prefix_run #(.N(100), .M(100 + 50 * g), .STEPS(200000)) u_run (
      .clk(clk), .rst_n(rst_n), .start(start), .fin(fin[g]), .checks(ch[g]), .failures(fl[g])
    );
  end

  function automatic void tally();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += ch[i]; failures += fl[i]; end
  endfunction

  initial begin
    #(64'd5000000);
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
