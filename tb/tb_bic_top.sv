// tb_bic_top: end-to-end test of the BIC system at its default size
// (N = 256 records, up to K = 64 statements per command).
// Each job places N attribute words and a command in the external-memory
// model, starts the DMA controller and, after 'done', compares the result
// area with the software reference. Jobs cover both output formats, every
// comparison, OR-NOT joins, a 64-statement command, an empty result, the
// published three-statement example (Sale < 50k OR Sale > 250k OR Sale in
// [100k, 200k], values in units of $1k) and memory grant stalls that hold up
// both reads and result writes. Each of these is counted and must occur.
module tb_bic_top;
  import bic_pkg::*;
  import tb_bic_ref_pkg::*;
  localparam int N = N_DEF;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dma_cfg_t cfg = '0;
  logic start = 0, busy, done, data_loaded;
  logic [15:0] result_words;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [ADDR_W_DEF-1:0] mem_addr;
  word_t mem_wdata, mem_rdata;
  int unsigned n_denied;
  int checks = 0, failures = 0, cyc = 0;
  int n_op [8];
  int n_ornot = 0, n_pos = 0, n_raw = 0, n_empty = 0, n_k64 = 0, n_res_stall = 0;

  bic_top dut (.*);
  tb_ext_mem #(.LAT(2), .GNT_PCT(85)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata), .n_denied);
  always @(negedge clk) cyc++;
  always @(posedge clk) if (mem_req && mem_we && !mem_gnt) n_res_stall++;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(word_q data, stmt_t cmd [$], out_mode_e m, int seq);
    logic [15:0] ab = 16'h0000, sb = 16'h1000, db = 16'h2000;
    bits_q b;
    word_q w;
    int t0;
    foreach (data[i]) u_mem.mem[ab + 16'(i)] = word_t'(data[i]);
    foreach (cmd[j]) begin
      u_mem.mem[sb + 16'(3*j)]     = {12'b0, cmd[j].join_op, cmd[j].op};
      u_mem.mem[sb + 16'(3*j + 1)] = cmd[j].thr_lo;
      u_mem.mem[sb + 16'(3*j + 2)] = cmd[j].thr_hi;
      n_op[cmd[j].op]++;
      if (cmd[j].join_op == JOIN_ORNOT) n_ornot++;
    end
    for (int i = 0; i < N + 2; i++) u_mem.mem[db + 16'(i)] = 16'h5A5A;
    b = ref_join(data, cmd);
    w = ref_format(b, m, seq);
    if (m == OUT_POS) n_pos++; else n_raw++;
    if (w[0] == 'hFFFF) n_empty++;
    if (cmd.size() == K_MAX) n_k64++;
    cfg = '{attr_base: ab, stmt_base: sb, n_stmt: 7'(cmd.size()), dst_base: db, out_mode: m};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    $display("job %0d: N=%0d K=%0d mode=%s, %0d result words, %0d cycles",
             seq, N, cmd.size(), m.name(), w.size(), cyc - t0);
    check("accelerator full after job", data_loaded);
    check($sformatf("job %0d result_words", seq), result_words == 16'(w.size()));
    foreach (w[i])
      check($sformatf("job %0d word %0d", seq, i), u_mem.mem[db + 16'(i)] == word_t'(w[i]));
    check("nothing written past the result", u_mem.mem[db + 16'(w.size())] == 16'h5A5A);
  endtask

  initial begin
    word_q data;
    stmt_t cmd [$];
    stmt_t s;
    automatic int seq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Job 0: the Sale example query, amounts in units of $1k
    data.delete(); cmd.delete();
    for (int i = 0; i < N; i++) data.push_back($urandom_range(0, 400));
    s = '{op: CMP_LT, join_op: JOIN_OR, last: 0, thr_lo: 16'd50, thr_hi: 16'd0};     cmd.push_back(s);
    s = '{op: CMP_GT, join_op: JOIN_OR, last: 0, thr_lo: 16'd250, thr_hi: 16'd0};    cmd.push_back(s);
    s = '{op: CMP_RANGE, join_op: JOIN_OR, last: 1, thr_lo: 16'd100, thr_hi: 16'd200}; cmd.push_back(s);
    run_job(data, cmd, OUT_POS, seq++);
    // Job 1: a full 64-statement command, raw bitmap
    data.delete(); cmd.delete();
    for (int i = 0; i < N; i++) data.push_back($urandom);
    for (int j = 0; j < K_MAX; j++) begin
      s = rand_stmt(65536, j == K_MAX - 1);
      s.join_op = JOIN_OR;
      s.thr_hi  = s.thr_lo + 16'(j);
      cmd.push_back(s);
    end
    run_job(data, cmd, OUT_RAW, seq++);
    // Job 2: empty result
    cmd.delete();
    s = '{op: CMP_NONE, join_op: JOIN_OR, last: 1, thr_lo: 16'd0, thr_hi: 16'd0}; cmd.push_back(s);
    run_job(data, cmd, OUT_POS, seq++);
    // Jobs 3..: random
    for (int t = 0; t < 8; t++) begin
      automatic int k = $urandom_range(1, 8);
      data.delete(); cmd.delete();
      for (int i = 0; i < N; i++) data.push_back($urandom_range(0, 999));
      for (int j = 0; j < k; j++) begin
        s = rand_stmt(1000, j == k - 1);
        if (j == 0) s.op = cmp_op_e'(t % 7);
        cmd.push_back(s);
      end
      run_job(data, cmd, out_mode_e'(t % 2), seq++);
    end
    for (int o = 0; o < 8; o++) check($sformatf("comparison %0d used", o), n_op[o] > 0);
    check("OR-NOT join used", n_ornot > 0);
    check("both output formats", n_pos > 0 && n_raw > 0);
    check("empty result", n_empty > 0);
    check("64-statement command", n_k64 > 0);
    check("memory grant stall", n_denied > 0);
    check("result write stalled by memory", n_res_stall > 0);
    $display("events: ornot=%0d pos=%0d raw=%0d empty=%0d k64=%0d mem_denied=%0d res_stall=%0d",
             n_ornot, n_pos, n_raw, n_empty, n_k64, n_denied, n_res_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
