// tb_bic_pajoin: self-checking test of the parallel joiner.
// Sends commands of random length (1..6 BIs, OR and OR-NOT joins) one BI per
// cycle and checks the joined result against a software model, the K-cycle
// result timing, a stall while the result is not taken and the clearing of
// the BITs between commands.
module tb_bic_pajoin;
  import bic_pkg::*;
  localparam int N = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bi_valid = 0, bi_ready, bi_last = 0;
  logic [N-1:0] bi = '0;
  join_op_e bi_join = JOIN_OR;
  logic res_valid, res_ready = 1;
  logic [N-1:0] res;
  int checks = 0, failures = 0, cyc = 0, stalls = 0;

  bic_pajoin #(.N(N)) dut (.*);
  always @(negedge clk) cyc++;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      automatic int k = (c == 0) ? 3 : $urandom_range(1, 6);
      automatic logic [N-1:0] expect_r = '0;
      automatic int t0;
      automatic bit hold = (c % 5 == 2);
      @(negedge clk);
      t0 = cyc;
      for (int j = 0; j < k; j++) begin
        bi = N'($urandom); bi_join = join_op_e'($urandom_range(0, 1));
        if (c == 0) bi_join = JOIN_OR;
        bi_last = (j == k - 1); bi_valid = 1;
        expect_r |= (bi_join == JOIN_ORNOT) ? ~bi : bi;
        @(posedge clk);
        check("BI accepted every cycle", bi_ready);
        #1;
      end
      bi_valid = 0;
      if (hold) res_ready = 0;
      check("result valid after last BI", res_valid);
      check("result appears K cycles after first BI", cyc - t0 == k);
      check("joined value", res == expect_r);
      if (hold) begin
        // offer the next command's first BI: it must stall
        bi_valid = 1; bi = '1; bi_last = 0;
        repeat (2) @(posedge clk);
        #1;
        check("BI stalls while result held", !bi_ready);
        check("result held", res_valid && res == expect_r);
        stalls++;
        bi_valid = 0;
        res_ready = 1;
      end
      @(posedge clk); #1;
      check("result consumed", !res_valid);
    end
    check("stall exercised", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
