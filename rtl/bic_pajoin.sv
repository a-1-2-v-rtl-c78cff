// bic_pajoin: parallel joiner (PAJOIN).
//
// N one-bit computation units. Each unit has a NOT gate, a multiplexer that
// picks the incoming BI bit or its inverse, an OR gate and a one-bit register
// (BIT): BIT <= BIT | (inv ? ~bi : bi). BITs are cleared at the start of every
// command; here the clear is folded into the first BI of a command, which is
// written into BIT instead of ORed (same result as clear-then-OR). When the
// BI flagged last has been absorbed, the joined result is offered on res_*
// and held until the post-processor takes it; incoming BIs stall meanwhile.
//
// Timing: one BI per cycle; the joined result is valid the cycle after the
// last BI is accepted, i.e. K cycles after the first BI of a K-statement
// command (three cycles for the published design's three-statement example).
//
// The unit structure and the clear follow the published design; reading the
// multiplexer as a BI / NOT-BI select (giving OR and OR-NOT joins) and the
// valid/ready handshake are this design's choices.
module bic_pajoin
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bi_valid,
  output logic         bi_ready,
  input  logic [N-1:0] bi,
  input  join_op_e     bi_join,
  input  logic         bi_last,
  output logic         res_valid,
  input  logic         res_ready,
  output logic [N-1:0] res
);
  logic [N-1:0] bits;     // the BIT registers
  logic         first;    // next BI starts a new command

  assign bi_ready  = !res_valid || res_ready;
  assign res       = bits;
  wire   bi_fire   = bi_valid && bi_ready;

  for (genvar i = 0; i < N; i++) begin : g_unit
    logic sel;   // multiplexer output: BI bit or its inverse
    assign sel = (bi_join == JOIN_ORNOT) ? ~bi[i] : bi[i];
    always_ff @(posedge clk) begin
      if (bi_fire) bits[i] <= (first ? 1'b0 : bits[i]) | sel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first     <= 1'b1;
      res_valid <= 1'b0;
    end else begin
      if (bi_fire) first <= bi_last;
      if (bi_fire && bi_last)  res_valid <= 1'b1;
      else if (res_ready)      res_valid <= 1'b0;
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            res_valid && !res_ready |=> res_valid && $stable(res));
endmodule
