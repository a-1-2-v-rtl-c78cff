// bic_dmac: direct memory access controller of the BIC system.
//
// Runs one job per 'start': reads N attribute words from cfg.attr_base and
// n_stmt statements (three words each: {12'b0, join_op, op}, thr_lo, thr_hi)
// from cfg.stmt_base, feeds them to the accelerator, and writes every word of
// the accelerator's result stream to cfg.dst_base onwards. The job ends when
// the result's last word has been written; 'done' pulses and result_words
// holds the number of words written. cfg is sampled at start; n_stmt must be
// 1 .. K_MAX.
//
// Memory port: mem_req with mem_we/mem_addr/mem_wdata is taken when mem_gnt
// is high; read data returns on mem_rvalid/mem_rdata in request order after
// any latency. Reads are issued back to back while fewer than MAX_OUT words
// are in flight or buffered, and the returned words wait in a MAX_OUT-deep
// FIFO, so a stalled accelerator never loses data. Writes take priority.
// With a one-cycle memory and a ready accelerator, reads stream at one word
// per cycle: N cycles of attributes, then 3 cycles per statement.
//
// The published description gives only the DMAC's role (moving inputs and results between
// external memory and the accelerator with low latency); the port, the
// statement layout and the buffering are this design's choices.
module bic_dmac
  import bic_pkg::*;
#(
  parameter int unsigned N       = N_DEF,
  parameter int unsigned MAX_OUT = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dma_cfg_t              cfg,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [15:0]           result_words,
  // external memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W_DEF-1:0] mem_addr,
  output word_t                 mem_wdata,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  word_t                 mem_rdata,
  // to / from the accelerator
  output logic                  load_valid,
  input  logic                  load_ready,
  output word_t                 load_data,
  output logic                  stmt_valid,
  input  logic                  stmt_ready,
  output stmt_t                 stmt,
  output out_mode_e             out_mode,
  input  logic                  res_valid,
  output logic                  res_ready,
  input  word_t                 res_data,
  input  logic                  res_last
);
  localparam int unsigned TW = $clog2(N + STMT_WORDS * K_MAX + 1);
  localparam int unsigned FW = $clog2(MAX_OUT);

  dma_cfg_t       cfg_q;
  logic [TW-1:0]  total;      // words to read
  logic [TW-1:0]  n_issued;   // read requests granted
  logic [TW-1:0]  n_popped;   // words taken from the FIFO
  logic [15:0]    n_written;

  // read-return FIFO
  word_t          fifo [MAX_OUT];
  logic [FW-1:0]  wr_ptr, rd_ptr;
  logic [FW:0]    fifo_cnt;
  logic           fifo_pop;
  word_t          head;

  // statement assembly
  logic [1:0]     sub;        // 0 control, 1 thr_lo, 2 thr_hi
  logic [TW-1:0]  stmt_idx;
  logic [3:0]     ctrl_q;     // {join_op, op}
  word_t          lo_q;

  assign head     = fifo[rd_ptr];
  assign out_mode = cfg_q.out_mode;

  // ---- memory port -------------------------------------------------------
  logic rd_want, wr_want;
  assign wr_want = busy && res_valid;
  assign rd_want = busy && (n_issued != total) &&
                   ((n_issued - n_popped) < TW'(MAX_OUT));

  always_comb begin
    mem_req   = wr_want || rd_want;
    mem_we    = wr_want;
    mem_wdata = res_data;
    if (wr_want) mem_addr = cfg_q.dst_base + ADDR_W_DEF'(n_written);
    else if (n_issued < TW'(N))
      mem_addr = cfg_q.attr_base + ADDR_W_DEF'(n_issued);
    else
      mem_addr = cfg_q.stmt_base + ADDR_W_DEF'(n_issued - TW'(N));
  end
  assign res_ready = busy && mem_gnt;
  wire rd_fire = rd_want && !wr_want && mem_gnt;
  wire wr_fire = wr_want && mem_gnt;

  // ---- FIFO to accelerator ----------------------------------------------
  wire in_attr = (n_popped < TW'(N));
  assign load_valid = busy && (fifo_cnt != 0) && in_attr;
  assign load_data  = head;
  assign stmt_valid = busy && (fifo_cnt != 0) && !in_attr && (sub == 2'd2);
  assign stmt = '{op:      cmp_op_e'(ctrl_q[2:0]),
                  join_op: join_op_e'(ctrl_q[3]),
                  last:    (stmt_idx == TW'(cfg_q.n_stmt) - TW'(1)),
                  thr_lo:  lo_q,
                  thr_hi:  head};
  assign fifo_pop = busy && (fifo_cnt != 0) &&
                    (in_attr ? load_ready : (sub != 2'd2 || stmt_ready));

  always_ff @(posedge clk) begin
    if (mem_rvalid) fifo[wr_ptr] <= mem_rdata;
    if (fifo_pop && !in_attr) begin
      if (sub == 2'd0) ctrl_q <= head[3:0];
      if (sub == 2'd1) lo_q   <= head;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      cfg_q        <= '0;
      total        <= '0;
      n_issued     <= '0;
      n_popped     <= '0;
      n_written    <= '0;
      result_words <= '0;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      fifo_cnt     <= '0;
      sub          <= '0;
      stmt_idx     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          cfg_q     <= cfg;
          total     <= TW'(N) + TW'(STMT_WORDS) * TW'(cfg.n_stmt);
          n_issued  <= '0;
          n_popped  <= '0;
          n_written <= '0;
          sub       <= '0;
          stmt_idx  <= '0;
        end
      end else begin
        if (rd_fire) n_issued <= n_issued + TW'(1);
        if (mem_rvalid) wr_ptr <= (wr_ptr == FW'(MAX_OUT - 1)) ? '0 : wr_ptr + FW'(1);
        if (fifo_pop) begin
          rd_ptr   <= (rd_ptr == FW'(MAX_OUT - 1)) ? '0 : rd_ptr + FW'(1);
          n_popped <= n_popped + TW'(1);
          if (!in_attr) begin
            sub <= (sub == 2'd2) ? 2'd0 : sub + 2'd1;
            if (sub == 2'd2) stmt_idx <= stmt_idx + TW'(1);
          end
        end
        fifo_cnt <= fifo_cnt + (FW+1)'(mem_rvalid) - (FW+1)'(fifo_pop);
        if (wr_fire) begin
          n_written <= n_written + 16'd1;
          if (res_last) begin
            busy         <= 1'b0;
            done         <= 1'b1;
            result_words <= n_written + 16'd1;
          end
        end
      end
    end
  end

  initial assert ((1 << FW) == MAX_OUT) else $error("bic_dmac: MAX_OUT must be a power of two");
  a_fifo : assert property (@(posedge clk) disable iff (!rst_n) fifo_cnt <= (FW+1)'(MAX_OUT));
endmodule
