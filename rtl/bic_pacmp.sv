// bic_pacmp: parallel comparator (PACMP).
//
// Holds N attribute words (WORDs) and N comparators (CMPs). Attribute words
// arrive one per cycle on the load stream and are shifted in, so after N
// pushes record i (the i-th word pushed) sits in WORD i. Once all N WORDs are
// filled, statements are accepted one per cycle; each is broadcast to every
// CMP and the N hit bits are registered as that statement's bitmap index
// (BI). BI bit i belongs to record i.
//
// Interface: valid/ready streams. load_* carries attribute words, stmt_*
// statements (bic_pkg::stmt_t), bi_* the BIs (with the statement's join
// operation and last flag carried along).
// Timing: a BI is valid the cycle after its statement is accepted; with
// bi_ready high a new statement is taken every cycle, so K statements produce
// K BIs in K cycles, and loading N words takes N cycles.
//
// Shifting the words in and broadcasting a statement to all CMPs follow the
// published design. This design's own choices: statements are held off until all N
// WORDs are loaded; once a command has used the WORDs, the next push starts a
// new dataset (the fill count restarts); no push is taken while a command is
// open, or in a cycle where a statement is offered.
module bic_pacmp
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  // attribute words
  input  logic           load_valid,
  output logic           load_ready,
  input  word_t          load_data,
  // statements
  input  logic           stmt_valid,
  output logic           stmt_ready,
  input  stmt_t          stmt,
  // bitmap of one statement
  output logic           bi_valid,
  input  logic           bi_ready,
  output logic [N-1:0]   bi,
  output join_op_e       bi_join,
  output logic           bi_last,
  output logic           full
);
  localparam int unsigned CW = $clog2(N + 1);

  word_t          words [N];
  logic [CW-1:0]  count;     // WORDs loaded in the current dataset
  logic           used;      // a statement has read the current dataset
  logic           in_cmd;    // a command is open (not yet seen its last statement)
  logic [N-1:0]   hits;

  assign full       = (count == CW'(N));
  assign stmt_ready = full && (!bi_valid || bi_ready);
  assign load_ready = (!full || used) && !in_cmd && !stmt_valid;

  wire load_fire = load_valid && load_ready;
  wire stmt_fire = stmt_valid && stmt_ready;

  for (genvar i = 0; i < N; i++) begin : g_cmp
    bic_cmp u_cmp (
      .word   (words[i]),
      .op     (stmt.op),
      .thr_lo (stmt.thr_lo),
      .thr_hi (stmt.thr_hi),
      .hit    (hits[i])
    );
  end

  // WORD shift register: new word enters at the top.
  always_ff @(posedge clk) begin
    if (load_fire) begin
      for (int i = 0; i < N - 1; i++) words[i] <= words[i+1];
      words[N-1] <= load_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      used   <= 1'b0;
      in_cmd <= 1'b0;
    end else begin
      if (load_fire) begin
        count <= used ? CW'(1) : count + CW'(1);
        used  <= 1'b0;
      end
      if (stmt_fire) begin
        used   <= 1'b1;
        in_cmd <= !stmt.last;
      end
    end
  end

  // BI output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bi_valid <= 1'b0;
    end else if (stmt_fire) begin
      bi_valid <= 1'b1;
    end else if (bi_ready) begin
      bi_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (stmt_fire) begin
      bi      <= hits;
      bi_join <= stmt.join_op;
      bi_last <= stmt.last;
    end
  end

  // A word and a statement are never taken in the same cycle.
  a_excl : assert property (@(posedge clk) disable iff (!rst_n) !(load_fire && stmt_fire));
  // A stalled BI holds its value.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            bi_valid && !bi_ready |=> bi_valid && $stable(bi));
endmodule
