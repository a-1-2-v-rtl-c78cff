// bic_mmpe: multi-match priority encoder (MMPE) of the post-processor.
//
// Returns the positions of all set bits of a BI, lowest position first, one
// per cycle. It uses the 1D-to-2D idea: the N-bit vector is viewed as ROWS
// rows of COLS = N/ROWS bits. An OR per row gives a ROWS-bit row-active
// vector; a ROWS-input priority encoder picks the first active row, a
// multiplexer selects that row and a COLS-input priority encoder picks its
// first set column. The position is row*COLS + col; that bit is then cleared
// in the working register and the next cycle finds the next one. Two small
// encoders replace one N-input encoder, which keeps the critical path short.
//
// Interface: a BI is taken on in_* when the encoder is idle; positions leave
// on out_* (valid/ready), out_last marks the final one. A BI with no set bit
// yields a single beat with out_empty and out_last high.
// Timing: the first position is valid the cycle after the BI is accepted;
// then one position per cycle while out_ready is high; a new BI can be taken
// in the cycle the last position leaves.
//
// The function and the 1D-to-2D method are the published design's; the square
// arrangement, the output order and the empty-result beat are this design's
// choices.
module bic_mmpe
  import bic_pkg::*;
#(
  parameter int unsigned N    = N_DEF,
  parameter int unsigned ROWS = 1 << ($clog2(N) / 2),
  localparam int unsigned COLS = N / ROWS,
  localparam int unsigned PW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  in_bi,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [PW-1:0] out_pos,
  output logic          out_last,
  output logic          out_empty
);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned CWD = $clog2(COLS);

  logic [N-1:0]     work;
  logic             busy;
  logic [ROWS-1:0]  row_any;
  logic [RW-1:0]    row_idx;
  logic             found;
  logic [COLS-1:0]  row_bits;
  logic [CWD-1:0]   col_idx;
  logic             col_any;
  logic [N-1:0]     clear_mask;
  logic [N-1:0]     work_next;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign row_any[r] = |work[r*COLS +: COLS];
  end

  bic_prienc #(.W(ROWS)) u_row_pe (.req(row_any),  .idx(row_idx), .any(found));
  assign row_bits = work[row_idx*COLS +: COLS];
  bic_prienc #(.W(COLS)) u_col_pe (.req(row_bits), .idx(col_idx), .any(col_any));

  assign out_pos    = {row_idx, col_idx};
  always_comb begin
    clear_mask = '0;
    clear_mask[out_pos] = found;
  end
  assign work_next  = work & ~clear_mask;
  assign out_valid  = busy;
  assign out_empty  = !found;
  assign out_last   = (work_next == '0);
  assign in_ready   = !busy || (out_ready && out_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      work <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      work <= in_bi;
    end else if (busy && out_ready) begin
      work <= work_next;
      if (out_last) busy <= 1'b0;
    end
  end

  initial assert (COLS * ROWS == N && (1 << RW) == ROWS && (1 << CWD) == COLS)
    else $error("bic_mmpe: N and ROWS must be powers of two with ROWS <= N");
  a_col : assert property (@(posedge clk) disable iff (!rst_n) busy && found |-> col_any);
endmodule
