// bt_prio_enc: priority encoder that returns the index of the lowest set bit.
//
// Used three times in the testor engine: to find the last '1' of a candidate
// (jump_1), the last '1' of a failing matrix row (jump_2), and the failing row
// closest to the top of the matrix (BM module). In every case "first" means the
// lowest index, so one encoder serves all three (sharing one module is this
// design's choice). Purely combinational; a simple priority chain.
//
//   req   W request bits
//   idx   index of the lowest set bit of req (0 when none is set)
//   found 1 when at least one bit of req is set
module bt_prio_enc #(
  parameter int W  = 30,
  localparam int IW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  req,
  output logic [IW-1:0] idx,
  output logic          found
);

  always_comb begin
    idx   = '0;
    found = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx   = IW'(i);
        found = 1'b1;
      end
    end
  end

endmodule
