// tb_bic_psproc: self-checking test of the post-processor.
// Sends random joined BIs (including empty and full ones) in both output
// modes, switching mode between results, and checks every output word
// against the reference formatter, plus the one-word-per-cycle rate.
module tb_bic_psproc;
  import bic_pkg::*;
  import tb_bic_ref_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  out_mode_e out_mode = OUT_POS;
  logic res_valid = 0, res_ready;
  logic [N-1:0] res = '0;
  logic out_valid, out_ready = 1, out_last;
  word_t out_data;
  int checks = 0, failures = 0, cyc = 0, n_pos = 0, n_raw = 0, n_empty = 0;

  bic_psproc #(.N(N)) dut (.*);
  always @(negedge clk) cyc++;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic bits_q b;
      automatic word_q e;
      automatic int w = 0, t0;
      automatic logic [N-1:0] v;
      automatic out_mode_e m = out_mode_e'($urandom_range(0, 1));
      automatic int dens = $urandom_range(0, 3);
      for (int i = 0; i < N; i++) begin
        v[i] = (t == 1) ? 1'b0 : (t == 2) ? 1'b1 : ($urandom_range(0, 7) < dens);
        b.push_back(v[i]);
      end
      if (t == 1) m = OUT_POS;
      e = ref_format(b, m, t);
      if (m == OUT_POS) n_pos++; else n_raw++;
      if (v == '0) n_empty++;
      @(negedge clk);
      res_valid = 1; res = v; out_mode = m;
      do @(posedge clk); while (!res_ready);
      #1; res_valid = 0; out_mode = out_mode_e'(!m);
      t0 = cyc;
      while (w < e.size()) begin
        @(posedge clk);
        if (out_valid) begin
          check($sformatf("result %0d word %0d", t, w), out_data == word_t'(e[w]));
          check("last flag", out_last == (w == e.size() - 1));
          w++;
        end
        #1;
      end
      check("one word per cycle", cyc - t0 == e.size());
    end
    check("both modes and an empty result seen", n_pos > 0 && n_raw > 0 && n_empty > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
