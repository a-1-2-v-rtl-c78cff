// tb_bic_buffer: self-checking test of the raw-bitmap buffer.
// Sends random BIs and checks the header, the N/16 data words, the footer,
// the last flag and the one-word-per-cycle rate, with and without random
// back-pressure.
module tb_bic_buffer;
  import bic_pkg::*;
  localparam int N = 64;
  localparam int NW = N / WORD_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  logic [N-1:0] in_bi = '0;
  logic [7:0] seq = '0;
  logic out_valid, out_ready = 1, out_last;
  word_t out_data;
  int checks = 0, failures = 0, cyc = 0;

  bic_buffer #(.N(N)) dut (.*);
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
    for (int t = 0; t < 60; t++) begin
      automatic logic [N-1:0] v = {$urandom, $urandom};
      automatic logic [7:0] s = 8'($urandom);
      automatic int w = 0, t0;
      automatic bit bp = t % 2;
      @(negedge clk);
      in_valid = 1; in_bi = v; seq = s;
      do @(posedge clk); while (!in_ready);
      #1; in_valid = 0; seq = ~s; in_bi = ~v;
      t0 = cyc;
      while (w < NW + 2) begin
        out_ready = bp ? 1'($urandom_range(0, 1)) : 1'b1;
        @(posedge clk);
        if (out_valid && out_ready) begin
          word_t e;
          if (w == 0) e = {8'hB1, s};
          else if (w == NW + 1) e = {8'hE1, s};
          else e = v[(w-1)*16 +: 16];
          check($sformatf("word %0d", w), out_data == e);
          check("last flag", out_last == (w == NW + 1));
          w++;
        end
        #1;
      end
      if (!bp) check("one word per cycle", cyc - t0 == NW + 2);
      out_ready = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
