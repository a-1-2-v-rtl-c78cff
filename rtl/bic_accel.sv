// bic_accel: the BIC accelerator, PACMP -> PAJOIN -> PSPROC.
//
// Attribute words stream into the parallel comparator (N words, one per
// cycle). Statements then stream in one per cycle; each produces a BI one
// cycle later, the joiner ORs the K BIs of a command together, and the
// post-processor turns the joined BI into either a position list or a framed
// raw bitmap (see bic_psproc).
//
// Timing with every stream ready: N cycles to load, one statement per cycle,
// joined result valid 2 cycles after the last statement is accepted, first
// output word one cycle after that. Indexing time is thus about N + K cycles,
// as the published design estimates; the post-processor overlaps with the next
// command. Back-pressure on out_* stalls the chain back to stmt_ready.
//
// The three-stage structure is the published design's; the handshakes are this
// design's choice.
module bic_accel
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load_valid,
  output logic      load_ready,
  input  word_t     load_data,
  input  logic      stmt_valid,
  output logic      stmt_ready,
  input  stmt_t     stmt,
  input  out_mode_e out_mode,
  output logic      out_valid,
  input  logic      out_ready,
  output word_t     out_data,
  output logic      out_last,
  output logic      full        // all N attribute words are loaded
);
  logic         bi_valid, bi_ready, bi_last;
  logic [N-1:0] bi;
  join_op_e     bi_join;
  logic         res_valid, res_ready;
  logic [N-1:0] res;

  bic_pacmp #(.N(N)) u_pacmp (
    .clk, .rst_n,
    .load_valid, .load_ready, .load_data,
    .stmt_valid, .stmt_ready, .stmt,
    .bi_valid, .bi_ready, .bi, .bi_join, .bi_last,
    .full
  );

  bic_pajoin #(.N(N)) u_pajoin (
    .clk, .rst_n,
    .bi_valid, .bi_ready, .bi, .bi_join, .bi_last,
    .res_valid, .res_ready, .res
  );

  bic_psproc #(.N(N)) u_psproc (
    .clk, .rst_n,
    .out_mode,
    .res_valid, .res_ready, .res,
    .out_valid, .out_ready, .out_data, .out_last
  );
endmodule
