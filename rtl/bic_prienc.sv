// bic_prienc: priority encoder, lowest index wins.
//
// Combinational. 'idx' is the position of the lowest set bit of 'req' and
// 'any' says whether one is set (idx is 0 otherwise). Used twice by the
// multi-match priority encoder: once over the row-active vector and once over
// the columns of the chosen row.
module bic_prienc #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         req,
  output logic [$clog2(W)-1:0] idx,
  output logic                 any
);
  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx = ($clog2(W))'(i);
        any = 1'b1;
      end
    end
  end
endmodule
