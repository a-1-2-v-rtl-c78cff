// tb_bic_dmac: self-checking test of the DMA controller.
// The controller runs against the external-memory model (random grants,
// 3-cycle read latency) and a stand-in for the accelerator that accepts words
// and statements with random stalls and answers the last statement with a
// result stream of known words. Checks: attribute words arrive in order,
// statements are decoded from their three memory words with the last flag on
// the final one, the result lands at the destination address, result_words
// and the done pulse.
module tb_bic_dmac;
  import bic_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dma_cfg_t cfg;
  logic start = 0, busy, done;
  logic [15:0] result_words;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [ADDR_W_DEF-1:0] mem_addr;
  word_t mem_wdata, mem_rdata;
  logic load_valid, load_ready, stmt_valid, stmt_ready, res_valid = 0, res_ready, res_last = 0;
  word_t load_data, res_data = '0;
  stmt_t stmt;
  out_mode_e out_mode;
  int unsigned n_denied;
  int checks = 0, failures = 0, cyc = 0, n_load_stall = 0, n_stmt_stall = 0;
  word_t got_load [$];
  stmt_t got_stmt [$];
  int n_res;

  bic_dmac #(.N(N)) dut (.*);
  tb_ext_mem #(.LAT(3), .GNT_PCT(70)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata), .n_denied);
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

  // accelerator stand-in
  always @(negedge clk) begin
    load_ready = $urandom_range(0, 3) != 0;
    stmt_ready = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) begin
    if (load_valid && load_ready) got_load.push_back(load_data);
    if (load_valid && !load_ready) n_load_stall++;
    if (stmt_valid && !stmt_ready) n_stmt_stall++;
    if (stmt_valid && stmt_ready) got_stmt.push_back(stmt);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int job = 0; job < 6; job++) begin
      automatic int k = (job == 0) ? K_MAX : $urandom_range(1, 10);
      automatic int r = $urandom_range(1, 20);
      automatic logic [15:0] ab = 16'(100 * job), sb = 16'h4000 + 16'(300 * job), db = 16'h8000 + 16'(64 * job);
      got_load.delete(); got_stmt.delete();
      for (int i = 0; i < N; i++) u_mem.mem[ab + 16'(i)] = word_t'($urandom);
      for (int j = 0; j < k; j++) begin
        u_mem.mem[sb + 16'(3*j)]     = word_t'($urandom_range(0, 15));
        u_mem.mem[sb + 16'(3*j + 1)] = word_t'($urandom);
        u_mem.mem[sb + 16'(3*j + 2)] = word_t'($urandom);
      end
      for (int i = 0; i < r; i++) u_mem.mem[db + 16'(i)] = '0;
      cfg = '{attr_base: ab, stmt_base: sb, n_stmt: 7'(k), dst_base: db, out_mode: out_mode_e'(job % 2)};
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check("busy after start", busy);
      check("out_mode passed on", out_mode == out_mode_e'(job % 2));
      // wait for the last statement, then send the result stream
      wait (got_stmt.size() == k);
      for (int i = 0; i < r; i++) begin
        @(negedge clk);
        res_valid = 1; res_data = 16'h1000 + 16'(i); res_last = (i == r - 1);
        do @(posedge clk); while (!res_ready);
        #1;
      end
      res_valid = 0; res_last = 0;
      @(posedge clk); #1;
      check("done pulse", done || !busy);
      wait (!busy);
      repeat (2) @(posedge clk);
      check("attribute count", got_load.size() == N);
      for (int i = 0; i < N && i < got_load.size(); i++)
        check($sformatf("attribute %0d", i), got_load[i] == u_mem.mem[ab + 16'(i)]);
      for (int j = 0; j < k; j++) begin
        check($sformatf("stmt %0d op/join", j),
              {got_stmt[j].join_op, got_stmt[j].op} == u_mem.mem[sb + 16'(3*j)][3:0]);
        check($sformatf("stmt %0d thresholds", j),
              got_stmt[j].thr_lo == u_mem.mem[sb + 16'(3*j + 1)] &&
              got_stmt[j].thr_hi == u_mem.mem[sb + 16'(3*j + 2)]);
        check($sformatf("stmt %0d last", j), got_stmt[j].last == (j == k - 1));
      end
      for (int i = 0; i < r; i++)
        check($sformatf("result word %0d", i), u_mem.mem[db + 16'(i)] == 16'h1000 + 16'(i));
      check("result_words", result_words == 16'(r));
    end
    check("memory grant stalls seen", n_denied > 0);
    check("accelerator stalls seen", n_load_stall > 0 && n_stmt_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
