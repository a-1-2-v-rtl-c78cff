// tb_bic_accel: end-to-end test of the accelerator (PACMP, PAJOIN, PSPROC).
// Loads data sets of N words (N reduced to 32), runs several commands on
// each in both output formats, with and without output back-pressure, and
// compares the output stream with the software reference. The first command
// is run with every stream ready to check the indexing time: its first
// output word leaves N + K + 2 cycles after the first attribute word.
module tb_bic_accel;
  import bic_pkg::*;
  import tb_bic_ref_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_valid = 0, load_ready;
  word_t load_data = '0;
  logic stmt_valid = 0, stmt_ready;
  stmt_t stmt = '0;
  out_mode_e out_mode = OUT_POS;
  logic out_valid, out_ready = 1, out_last, full;
  word_t out_data;
  int checks = 0, failures = 0, cyc = 0, n_results = 0, n_stall = 0;
  int exp_q [$];
  int exp_last [$];
  int t_first_load = -1, t_first_out = -1, k_first = 0;
  bit bp = 0, all_sent = 0;

  bic_accel #(.N(N)) dut (.*);
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

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (t_first_out < 0) t_first_out = cyc;
      if (exp_q.size() == 0) check("unexpected output word", 0);
      else begin
        int e, l;
        e = exp_q.pop_front();
        l = exp_last.pop_front();
        check($sformatf("output word got %h exp %h", out_data, e), out_data == word_t'(e));
        check("output last", out_last == l[0]);
        if (out_last) n_results++;
      end
    end
    if (rst_n && out_valid && !out_ready) n_stall++;
  end
  always @(negedge clk) out_ready = bp ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    word_q data;
    automatic int seq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 4; set++) begin
      data.delete();
      for (int i = 0; i < N; i++) data.push_back($urandom_range(0, 99));
      @(negedge clk);
      foreach (data[i]) begin
        load_valid = 1; load_data = word_t'(data[i]);
        do @(posedge clk); while (!load_ready);
        if (t_first_load < 0) t_first_load = cyc;
        #1;
      end
      load_valid = 0;
      for (int c = 0; c < 3; c++) begin
        automatic stmt_t cmd [$];
        automatic bits_q b;
        automatic word_q w;
        automatic int k = (set == 0 && c == 0) ? 5 : $urandom_range(1, 8);
        automatic out_mode_e m = out_mode_e'((set + c) % 2);
        if (set == 0 && c == 0) k_first = k;
        for (int j = 0; j < k; j++) cmd.push_back(rand_stmt(100, j == k - 1));
        b = ref_join(data, cmd);
        w = ref_format(b, m, seq++);
        foreach (w[i]) begin exp_q.push_back(w[i]); exp_last.push_back(i == w.size() - 1); end
        bp = (set >= 2);
        foreach (cmd[j]) begin
          stmt_valid = 1; stmt = cmd[j]; out_mode = m;
          do @(posedge clk); while (!stmt_ready);
          #1;
        end
        stmt_valid = 0;
        // out_mode is sampled when the joined BI reaches the post-processor
        repeat (3) @(posedge clk);
        while (dut.u_psproc.res_valid) @(posedge clk);
        #1;
      end
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check("indexing time N + K + 2", t_first_out - t_first_load == N + k_first + 2);
    check("all results seen", n_results == 12);
    check("back-pressure exercised", n_stall > 0);
    $display("indexing: first word in at %0d, first result word out at %0d (N=%0d K=%0d)",
             t_first_load, t_first_out, N, k_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
