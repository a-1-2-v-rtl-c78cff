// bic_psproc: post-processor (PSPROC).
//
// Hands each joined BI from the joiner to one of two sub-modules and merges
// their outputs into one WORD_W-bit result stream:
//   OUT_POS  multi-match priority encoder (bic_mmpe): one word per set bit,
//            holding its position, lowest first. Bit 15 of the word flags the
//            last position. A BI without set bits gives the single word
//            16'hFFFF.
//   OUT_RAW  buffer (bic_buffer): header, the BI in N/WORD_W words, footer.
// out_mode is sampled when a BI is accepted. An 8-bit sequence number,
// counted per result from reset, goes into the raw format's header/footer.
//
// Timing: the first word is valid the cycle after a BI is accepted, then one
// word per cycle. A new BI is taken only when the current result is leaving,
// so results never interleave.
//
// The two sub-modules are the published design's; the mode input, the end-of-list
// flag and the sequence number are this design's choices.
module bic_psproc
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  out_mode_e    out_mode,
  input  logic         res_valid,
  output logic         res_ready,
  input  logic [N-1:0] res,
  output logic         out_valid,
  input  logic         out_ready,
  output word_t        out_data,
  output logic         out_last
);
  localparam int unsigned PW = $clog2(N);

  logic          pe_in_ready, pe_valid, pe_last, pe_empty;
  logic [PW-1:0] pe_pos;
  logic          bf_in_ready, bf_valid, bf_last;
  word_t         bf_data;
  logic [7:0]    seq;

  assign res_ready = pe_in_ready && bf_in_ready;
  wire   fire      = res_valid && res_ready;

  bic_mmpe #(.N(N)) u_mmpe (
    .clk, .rst_n,
    .in_valid  (res_valid && res_ready && out_mode == OUT_POS),
    .in_ready  (pe_in_ready),
    .in_bi     (res),
    .out_valid (pe_valid),
    .out_ready (out_ready),
    .out_pos   (pe_pos),
    .out_last  (pe_last),
    .out_empty (pe_empty)
  );

  bic_buffer #(.N(N)) u_buffer (
    .clk, .rst_n,
    .in_valid  (res_valid && res_ready && out_mode == OUT_RAW),
    .in_ready  (bf_in_ready),
    .in_bi     (res),
    .seq       (seq),
    .out_valid (bf_valid),
    .out_ready (out_ready),
    .out_data  (bf_data),
    .out_last  (bf_last)
  );

  always_comb begin
    out_valid = pe_valid || bf_valid;
    if (pe_valid) begin
      out_last = pe_last;
      if (pe_empty) out_data = POS_END;
      else          out_data = {pe_last, (WORD_W - 1 - PW)'(0), pe_pos};
    end else begin
      out_last = bf_last;
      out_data = bf_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    seq <= '0;
    else if (fire) seq <= seq + 8'd1;
  end

  initial assert (PW < WORD_W) else $error("bic_psproc: positions must fit below the flag bit");
  a_one : assert property (@(posedge clk) disable iff (!rst_n) !(pe_valid && bf_valid));
endmodule
