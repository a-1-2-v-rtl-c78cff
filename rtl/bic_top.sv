// bic_top: the bitmap-index-creation (BIC) system: DMA controller plus
// accelerator.
//
// A job is described by cfg (bic_pkg::dma_cfg_t) and launched by a 'start'
// pulse. The DMA controller reads N attribute words and the command's
// statements from external memory, the accelerator compares all N words with
// each statement in parallel, ORs the per-statement bitmaps together and
// formats the result, and the DMA controller writes the result words to
// cfg.dst_base onwards. 'done' pulses when the last word is written;
// result_words gives their count.
//
// Result formats (cfg.out_mode):
//   OUT_POS  one word per set bit, its record number, ascending; bit 15 set on
//            the last one; 16'hFFFF alone if no record matched.
//   OUT_RAW  header {8'hB1, seq}, N/16 bitmap words (bit i = record i),
//            footer {8'hE1, seq}.
//
// Timing: with a memory that grants every cycle and returns data one cycle
// later, a job takes about N + 3K + (result words) + a few cycles; the
// accelerator alone needs N + K. The standby modes of the chip (stopping the
// clock, back-gate bias) need no logic here. Defaults N = 256, K_MAX = 64 and
// 16-bit words follow the fabricated chip.
module bic_top
  import bic_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dma_cfg_t              cfg,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [15:0]           result_words,
  output logic                  data_loaded,   // accelerator holds N words
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W_DEF-1:0] mem_addr,
  output word_t                 mem_wdata,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  word_t                 mem_rdata
);
  logic      load_valid, load_ready;
  word_t     load_data;
  logic      stmt_valid, stmt_ready;
  stmt_t     stmt;
  out_mode_e out_mode;
  logic      res_valid, res_ready, res_last;
  word_t     res_data;

  bic_dmac #(.N(N)) u_dmac (
    .clk, .rst_n, .cfg, .start, .busy, .done, .result_words,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .load_valid, .load_ready, .load_data,
    .stmt_valid, .stmt_ready, .stmt, .out_mode,
    .res_valid, .res_ready, .res_data, .res_last
  );

  bic_accel #(.N(N)) u_accel (
    .clk, .rst_n,
    .load_valid, .load_ready, .load_data,
    .stmt_valid, .stmt_ready, .stmt,
    .out_mode,
    .out_valid (res_valid),
    .out_ready (res_ready),
    .out_data  (res_data),
    .out_last  (res_last),
    .full      (data_loaded)
  );
endmodule
