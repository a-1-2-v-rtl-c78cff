// bic_buffer: raw-bitmap output path (BUFFER) of the post-processor.
//
// Takes one joined BI and sends it as a stream of WORD_W-bit words framed by
// a header and a footer:
//   word 0          header  {HDR_TAG, seq}
//   word 1 .. NW    BI bits [WORD_W*j +: WORD_W] for j = 0 .. NW-1
//                   (bit 0 of a word is the lowest record of that group)
//   word NW+1       footer  {FTR_TAG, seq}          (out_last high)
// with NW = N / WORD_W. 'seq' is sampled with the BI.
//
// Timing: the header is valid the cycle after the BI is accepted; NW+2 words
// follow at one per cycle while out_ready is high; a new BI can be accepted
// in the cycle the footer leaves.
//
// The published description says only that the raw BI is returned with headers and footers
// attached; their contents and the word order are this design's choice.
module bic_buffer
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  localparam int unsigned NW = N / WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] in_bi,
  input  logic [7:0]   seq,
  output logic         out_valid,
  input  logic         out_ready,
  output word_t        out_data,
  output logic         out_last
);
  localparam int unsigned IW = $clog2(NW + 2);

  logic [N-1:0]  bi_q;
  logic [7:0]    seq_q;
  logic          busy;
  logic [IW-1:0] idx;     // 0 header, 1..NW data, NW+1 footer

  assign out_valid = busy;
  assign out_last  = (idx == IW'(NW + 1));
  assign in_ready  = !busy || (out_ready && out_last);

  always_comb begin
    if (idx == '0)     out_data = {HDR_TAG, seq_q};
    else if (out_last) out_data = {FTR_TAG, seq_q};
    else               out_data = bi_q[(32'(idx) - 1) * WORD_W +: WORD_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      idx  <= '0;
    end else if (busy && out_ready) begin
      idx <= idx + IW'(1);
      if (out_last) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      bi_q  <= in_bi;
      seq_q <= seq;
    end
  end

  initial assert (NW * WORD_W == N) else $error("bic_buffer: N must be a multiple of WORD_W");
endmodule
