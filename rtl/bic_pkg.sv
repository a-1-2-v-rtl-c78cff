// bic_pkg: types and constants shared by the bitmap-index-creation (BIC) blocks.
//
// A BIC command is a list of K statements. Each statement compares every
// stored attribute word with a threshold (or a [lo, hi] range) and yields one
// bitmap index (BI) of N bits; the statement's join operation says how that BI
// is merged into the running result. The sizes N = 256 and K = 64 and the
// 16-bit word width are those of the fabricated chip; the operation encodings,
// the memory layout of a statement and the DMA descriptor are this design's
// own choices.
package bic_pkg;

  // Width of one attribute word (the published design allows e.g. 32 as well).
  localparam int unsigned WORD_W = 16;
  // Default number of attribute words held at once (BI length).
  localparam int unsigned N_DEF  = 256;
  // Largest number of statements in one command.
  localparam int unsigned K_MAX  = 64;
  // Default external-memory address width (words).
  localparam int unsigned ADDR_W_DEF = 16;

  typedef logic [WORD_W-1:0] word_t;

  // Comparison performed by every comparator for one statement.
  typedef enum logic [2:0] {
    CMP_EQ    = 3'd0,  // x == lo
    CMP_NE    = 3'd1,  // x != lo
    CMP_LT    = 3'd2,  // x <  lo
    CMP_LE    = 3'd3,  // x <= lo
    CMP_GT    = 3'd4,  // x >  lo
    CMP_GE    = 3'd5,  // x >= lo
    CMP_RANGE = 3'd6,  // lo <= x <= hi
    CMP_NONE  = 3'd7   // never true
  } cmp_op_e;

  // How a statement's BI enters the joined result: BIT |= BI or BIT |= ~BI.
  typedef enum logic {
    JOIN_OR    = 1'b0,
    JOIN_ORNOT = 1'b1
  } join_op_e;

  // Result format produced by the post-processor.
  typedef enum logic {
    OUT_POS = 1'b0,  // list of set-bit positions (MMPE)
    OUT_RAW = 1'b1   // raw bitmap with header and footer (BUFFER)
  } out_mode_e;

  typedef struct packed {
    cmp_op_e  op;
    join_op_e join_op;
    logic     last;     // final statement of the command
    word_t    thr_lo;
    word_t    thr_hi;
  } stmt_t;

  // Framing words of the raw-bitmap format and the end-of-list marker of
  // the position format.
  localparam logic [7:0]  HDR_TAG  = 8'hB1;
  localparam logic [7:0]  FTR_TAG  = 8'hE1;
  localparam word_t       POS_END  = '1;

  // Job descriptor of the DMA controller. A statement occupies three memory
  // words: {12'b0, join_op, op}, thr_lo, thr_hi.
  typedef struct packed {
    logic [ADDR_W_DEF-1:0] attr_base;  // N attribute words
    logic [ADDR_W_DEF-1:0] stmt_base;  // 3*n_stmt statement words
    logic [6:0]            n_stmt;     // 1..K_MAX
    logic [ADDR_W_DEF-1:0] dst_base;   // result words
    out_mode_e             out_mode;
  } dma_cfg_t;

  localparam int unsigned STMT_WORDS = 3;

endpackage
