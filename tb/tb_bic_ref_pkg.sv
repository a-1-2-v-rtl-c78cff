// tb_bic_ref_pkg: software reference of bitmap index creation, used by the
// testbenches to work out expected results independently of the RTL.
//   ref_hit     one comparison
//   ref_join    joined BI of a command over a data set (bit i = record i)
//   ref_format  the result words for a joined BI in either output format
package tb_bic_ref_pkg;
  import bic_pkg::*;

  typedef bit      bits_q [$];
  typedef int      word_q [$];

  function automatic bit ref_hit(int unsigned x, stmt_t s);
    int unsigned l = 32'(s.thr_lo), h = 32'(s.thr_hi);
    case (s.op)
      CMP_EQ:    return x == l;
      CMP_NE:    return x != l;
      CMP_LT:    return x < l;
      CMP_LE:    return x <= l;
      CMP_GT:    return x > l;
      CMP_GE:    return x >= l;
      CMP_RANGE: return x >= l && x <= h;
      default:   return 0;
    endcase
  endfunction

  function automatic bits_q ref_join(word_q data, stmt_t stmts [$]);
    bits_q r;
    for (int i = 0; i < data.size(); i++) begin
      bit acc = 0;
      for (int k = 0; k < stmts.size(); k++) begin
        bit h = ref_hit(data[i], stmts[k]);
        acc |= (stmts[k].join_op == JOIN_ORNOT) ? !h : h;
      end
      r.push_back(acc);
    end
    return r;
  endfunction

  function automatic word_q ref_format(bits_q b, out_mode_e mode, int seq);
    word_q w;
    if (mode == OUT_POS) begin
      for (int i = 0; i < b.size(); i++) if (b[i]) w.push_back(i);
      if (w.size() == 0) w.push_back('hFFFF);
      else w[w.size()-1] = w[w.size()-1] + 'h8000;
    end else begin
      w.push_back('hB100 + (seq % 256));
      for (int j = 0; j < b.size() / 16; j++) begin
        int v = 0;
        for (int t = 0; t < 16; t++) if (b[16*j + t]) v += (1 << t);
        w.push_back(v);
      end
      w.push_back('hE100 + (seq % 256));
    end
    return w;
  endfunction

  // A random statement over values 0..range-1.
  function automatic stmt_t rand_stmt(int range, bit last);
    stmt_t s;
    s.op      = cmp_op_e'($urandom_range(0, 6));
    s.join_op = join_op_e'($urandom_range(0, 3) == 0);
    s.last    = last;
    s.thr_lo  = word_t'($urandom_range(0, range - 1));
    s.thr_hi  = s.thr_lo + word_t'($urandom_range(0, range / 3));
    return s;
  endfunction
endpackage
