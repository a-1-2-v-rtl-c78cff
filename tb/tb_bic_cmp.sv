// tb_bic_cmp: self-checking test of one comparator.
// Applies every operation to random and corner-case words/thresholds and
// compares the hit bit with a reference computed on integers.
module tb_bic_cmp;
  import bic_pkg::*;
  word_t   word, lo, hi;
  cmp_op_e op;
  logic    hit;
  int      checks = 0, failures = 0;

  bic_cmp dut (.word, .op, .thr_lo(lo), .thr_hi(hi), .hit);

  function automatic bit ref_hit(int unsigned x, int unsigned l, int unsigned h, int o);
    case (o)
      0: return x == l;
      1: return x != l;
      2: return x < l;
      3: return !(x > l);
      4: return x > l;
      5: return !(x < l);
      6: return (x - l) <= (h - l) && h >= l && x >= l;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int o = 0; o < 8; o++) begin
        op   = cmp_op_e'(o);
        word = (n % 5 == 0) ? word_t'(n % 7) : word_t'($urandom);
        lo   = (n % 3 == 0) ? word : word_t'($urandom);
        hi   = (n % 4 == 0) ? word : word_t'($urandom);
        if (n == 1) begin word = '1; lo = '1; hi = '1; end
        #1;
        checks++;
        if (hit !== ref_hit(word, lo, hi, o)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d x=%h lo=%h hi=%h hit=%b", o, word, lo, hi, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
