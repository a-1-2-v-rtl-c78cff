// tb_bic_pacmp: self-checking test of the parallel comparator.
// Loads N random words (N reduced to 32), then issues statements one per
// cycle and checks each BI against a software model, including the one-cycle
// latency, one BI per cycle, a back-pressure stall and reloading a new
// dataset after a command.
module tb_bic_pacmp;
  import bic_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_valid = 0, load_ready;
  word_t load_data = '0;
  logic stmt_valid = 0, stmt_ready;
  stmt_t stmt = '0;
  logic bi_valid, bi_ready = 1, bi_last, full;
  logic [N-1:0] bi;
  join_op_e bi_join;
  int checks = 0, failures = 0, cyc = 0;
  word_t mem [N];

  bic_pacmp #(.N(N)) dut (.*);

  always @(negedge clk) cyc++;

  function automatic logic [N-1:0] model(stmt_t s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      int unsigned x = 32'(mem[i]), l = 32'(s.thr_lo), h = 32'(s.thr_hi);
      case (s.op)
        CMP_EQ: r[i] = x == l;  CMP_NE: r[i] = x != l;
        CMP_LT: r[i] = x < l;   CMP_LE: r[i] = x <= l;
        CMP_GT: r[i] = x > l;   CMP_GE: r[i] = x >= l;
        CMP_RANGE: r[i] = (x >= l) && (x <= h);
        default: r[i] = 0;
      endcase
    end
    return r;
  endfunction

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic load_all();
    int t0;
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < N; i++) begin
      mem[i] = word_t'($urandom_range(0, 200));
      load_valid = 1; load_data = mem[i];
      do @(posedge clk); while (!load_ready);
      #1;
    end
    load_valid = 0;
    check("load takes N cycles", cyc - t0 == N);
    check("full after N words", full);
  endtask

  function automatic stmt_t rand_stmt(bit last);
    stmt_t s;
    s.op = cmp_op_e'($urandom_range(0, 6));
    s.join_op = join_op_e'($urandom_range(0, 1));
    s.last = last;
    s.thr_lo = word_t'($urandom_range(0, 200));
    s.thr_hi = s.thr_lo + word_t'($urandom_range(0, 80));
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stmt_t q [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      load_all();
      check("stmt not accepted together with load", load_ready == 0 || stmt_valid == 0);
      // a command of 8 statements, one per cycle; stall bi_ready in round 1
      q.delete();
      for (int k = 0; k < 8; k++) q.push_back(rand_stmt(k == 7));
      fork
        begin
          for (int k = 0; k < 8; k++) begin
            stmt_valid = 1; stmt = q[k];
            do @(posedge clk); while (!stmt_ready);
            #1;
          end
          stmt_valid = 0;
        end
        begin
          for (int k = 0; k < 8; k++) begin
            automatic int t_wait = 0;
            if (round == 1 && k == 3) begin
              @(negedge clk); bi_ready = 0; repeat (3) @(negedge clk);
              check("BI held under stall", bi_valid);
              bi_ready = 1;
            end
            do begin @(posedge clk); t_wait++; end while (!(bi_valid && bi_ready));
            check($sformatf("BI %0d value", k), bi == model(q[k]));
            check($sformatf("BI %0d join", k), bi_join == q[k].join_op);
            check($sformatf("BI %0d last", k), bi_last == q[k].last);
            if (round != 1 && k > 0) check("one BI per cycle", t_wait == 1);
          end
        end
      join
      @(posedge clk); #1;
      check("BI valid drops", !bi_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
