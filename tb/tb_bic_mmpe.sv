// tb_bic_mmpe: self-checking test of the multi-match priority encoder.
// Feeds the published example (bits 1, 5, 6 set), an empty vector, an
// all-ones vector and random vectors of various densities, and checks that
// every set position comes out once, in ascending order, one per cycle, with
// out_last on the final one; random back-pressure is applied in part of the run.
module tb_bic_mmpe;
  localparam int N = 64;
  localparam int PW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  logic [N-1:0] in_bi = '0;
  logic out_valid, out_ready = 1, out_last, out_empty;
  logic [PW-1:0] out_pos;
  int checks = 0, failures = 0, cyc = 0;

  bic_mmpe #(.N(N), .ROWS(8)) dut (.*);
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

  task automatic run(logic [N-1:0] v, bit bp);
    int exp_pos [$];
    int got = 0, t0, beats = 0;
    for (int i = 0; i < N; i++) if (v[i]) exp_pos.push_back(i);
    @(negedge clk);
    in_valid = 1; in_bi = v;
    do @(posedge clk); while (!in_ready);
    #1; in_valid = 0;
    t0 = cyc;
    forever begin
      if (bp) out_ready = $urandom_range(0, 1); else out_ready = 1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        beats++;
        if (exp_pos.size() == 0) begin
          check("empty flagged", out_empty && out_last);
          break;
        end
        check($sformatf("position %0d", got), !out_empty && out_pos == PW'(exp_pos[got]));
        check("last flag", out_last == (got == exp_pos.size() - 1));
        got++;
        if (out_last) break;
      end
      #1;
    end
    if (!bp) check("one position per cycle", cyc - t0 == beats);
    #1; out_ready = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(N'(64'b01100010), 0);   // record 1, 5 and 6: outputs 1, 5, 6
    run('0, 0);
    run('1, 0);
    run(N'(1) << (N - 1), 0);
    for (int t = 0; t < 150; t++) begin
      automatic logic [N-1:0] v = '0;
      automatic int dens = $urandom_range(0, 4);
      for (int i = 0; i < N; i++) v[i] = ($urandom_range(0, 7) < dens);
      run(v, t % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
