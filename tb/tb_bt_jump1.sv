// tb_bt_jump1: self-checking test of the testor jump (BT step 3).
// The reference adds the value of the lowest set bit, found as a & -a, and
// checks the carry out; also walks a few worked examples by hand.
module tb_bt_jump1;
  localparam int N = 9;
  localparam int NB = 30;

  logic [N-1:0]  cand;
  logic [N-1:0]  next;
  logic          overflow;
  logic [NB-1:0] cand_b, next_b;
  logic          overflow_b;
  int            checks = 0, failures = 0;

  bt_jump1 #(.N(N))  dut   (.cand(cand),   .next(next),   .overflow(overflow));
  bt_jump1 #(.N(NB)) dut_b (.cand(cand_b), .next(next_b), .overflow(overflow_b));

  task automatic expect9(logic [N-1:0] c, logic [N-1:0] e, logic eo);
    cand = c;
    #1;
    checks++;
    if (next !== e || overflow !== eo) begin
      failures++;
      $display("FAIL N=9 cand=%b next=%b ovf=%b expected %b %b", c, next, overflow, e, eo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB:0] sum;
    // Worked example: (0,1,1,0,0,1,0,0,0) -> (0,1,1,0,1,0,0,0,0)
    expect9(9'b011001000, 9'b011010000, 1'b0);
    expect9(9'b000000001, 9'b000000010, 1'b0);
    expect9(9'b100000000, 9'b000000000, 1'b1);
    expect9(9'b111111111, 9'b000000000, 1'b1);
    expect9(9'b011111000, 9'b100000000, 1'b0);
    // Exhaustive at N = 9.
    for (int a = 1; a < (1 << N); a++) begin
      logic [N:0] s;
      s = (N+1)'(a) + (N+1)'(a & -a);
      expect9(N'(a), s[N-1:0], s[N]);
    end
    // Random at N = 30.
    for (int i = 0; i < 3000; i++) begin
      cand_b = NB'($urandom) << ($urandom % NB);
      if (cand_b == '0) cand_b = NB'(1);
      #1;
      sum = {1'b0, cand_b} + {1'b0, cand_b & (~cand_b + 1'b1)};
      checks++;
      if (next_b !== sum[NB-1:0] || overflow_b !== sum[NB]) begin
        failures++;
        $display("FAIL N=30 cand=%h next=%h", cand_b, next_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
