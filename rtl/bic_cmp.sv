// bic_cmp: one comparator (CMP) of the parallel comparator array.
//
// Purely combinational: compares a stored attribute word with the current
// statement's threshold and returns one bitmap bit. Comparisons are unsigned.
// The '<', '>' and range tests come from the published design's examples; the
// remaining operations (==, !=, <=, >=) and the encoding are this design's
// choice. The PACMP registers the result, so a BI appears one cycle after its
// statement is accepted.
module bic_cmp
  import bic_pkg::*;
(
  input  word_t   word,
  input  cmp_op_e op,
  input  word_t   thr_lo,
  input  word_t   thr_hi,
  output logic    hit
);
  always_comb begin
    unique case (op)
      CMP_EQ:    hit = (word == thr_lo);
      CMP_NE:    hit = (word != thr_lo);
      CMP_LT:    hit = (word <  thr_lo);
      CMP_LE:    hit = (word <= thr_lo);
      CMP_GT:    hit = (word >  thr_lo);
      CMP_GE:    hit = (word >= thr_lo);
      CMP_RANGE: hit = (word >= thr_lo) && (word <= thr_hi);
      default:   hit = 1'b0;
    endcase
  end
endmodule
