// Shared types and constants of the CREMA coarse-grain reconfigurable array.
//
// The array is a 4-row by 8-column grid of 32-bit processing elements (PEs)
// fed from one 16-bank local memory through an input I/O buffer and draining
// through an output I/O buffer into a second local memory. Each PE holds a
// small context memory; one context word selects the PE's operation and the
// sources of its two operands. The sizes (4x8 PEs, 16 banks of 256 words,
// 16 buffer lanes of 32 bits, 15 routing possibilities) follow the published
// CREMA template; eight contexts per PE is the most that any of the mapped
// receiver kernels needs. The operation and source encodings, the number of
// I/O buffer patterns and the layout of the configuration word are this
// implementation's own.
package crema_pkg;

  localparam int DW        = 32;   // datapath width
  localparam int ROWS      = 4;    // PE rows
  localparam int COLS      = 8;    // PE columns
  localparam int LANES     = 16;   // I/O buffer lanes, local memory banks
  localparam int DEPTH     = 256;  // words per local memory bank
  localparam int NCTX      = 8;    // contexts per PE
  localparam int NPAT      = 8;    // I/O buffer patterns
  localparam int NSRC      = 15;   // routing possibilities per operand
  localparam int MAX_LAT   = 32;   // longest write latency of the control unit

  localparam int AW        = $clog2(DEPTH);
  localparam int CTXW      = $clog2(NCTX);
  localparam int PATW      = $clog2(NPAT);
  localparam int LANEW     = $clog2(LANES);
  localparam int PEW       = $clog2(ROWS * COLS);

  // PE operations. Each one maps to a functional unit of the PE core.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // output zero
    OP_ADD   = 4'd1,   // A + B
    OP_SUB   = 4'd2,   // A - B
    OP_MUL   = 4'd3,   // low 32 bits of A * B
    OP_SHR   = 4'd4,   // A >>> immediate (arithmetic)
    OP_SHL   = 4'd5,   // A << immediate
    OP_DELAY = 4'd6,   // OUT1 = A, OUT2 = B, one register stage
    OP_URF   = 4'd7,   // unregistered feed-through: OUT1 = A, OUT2 = B, no register
    OP_LDIMM = 4'd8,   // immediate register <= B, output zero
    OP_AND   = 4'd9,   // LUT: A & B
    OP_OR    = 4'd10,  // LUT: A | B
    OP_XOR   = 4'd11   // LUT: A ^ B
  } pe_op_e;

  // Operand sources: the 15 routing possibilities of a PE input, plus zero.
  // "_A" is the OUT1 of the named neighbour, "_B" its OUT2.
  typedef enum logic [3:0] {
    SRC_UP_A   = 4'd0,   // local: PE above (row 0: input buffer lane 2c)
    SRC_UP_B   = 4'd1,   //        (row 0: input buffer lane 2c+1)
    SRC_UL_A   = 4'd2,   // local: PE up-left
    SRC_UL_B   = 4'd3,
    SRC_UR_A   = 4'd4,   // local: PE up-right
    SRC_UR_B   = 4'd5,
    SRC_LEFT_A = 4'd6,   // local: PE to the left
    SRC_LEFT_B = 4'd7,
    SRC_LOOP_A = 4'd8,   // local: own outputs fed back
    SRC_LOOP_B = 4'd9,
    SRC_IL_A   = 4'd10,  // interleaved: PE two rows above (row 1: input buffer)
    SRC_IL_B   = 4'd11,
    SRC_VERT   = 4'd12,  // global vertical: input buffer lane 2c, down the column
    SRC_HOR0   = 4'd13,  // global horizontal: input buffer lane 0, to every PE
    SRC_HOR1   = 4'd14,  // global horizontal: input buffer lane 1, to every PE
    SRC_ZERO   = 4'd15
  } pe_src_e;

  // One context of one PE.
  typedef struct packed {
    pe_op_e  op;
    pe_src_e src_a;
    pe_src_e src_b;
  } pe_ctx_t;

  // Configuration word as it travels through the array: header (destination
  // PE and context slot) plus the context itself. 20 bits of a 32-bit write.
  typedef struct packed {
    logic [PEW-1:0]  pe;
    logic [CTXW-1:0] slot;
    pe_ctx_t         ctx;
  } cfg_word_t;

  // One lane of one I/O buffer pattern: which input lane it takes and
  // whether it is enabled (for the output buffer: whether that bank is written).
  typedef struct packed {
    logic [PATW-1:0]  pat;
    logic [LANEW-1:0] lane;
    logic [LANEW-1:0] sel;
    logic             en;
  } iobuf_cfg_t;

  // Register indices of the accelerator's processor-side register port.
  typedef enum logic [4:0] {
    REG_CTRL     = 5'd0,   // wr: bit0 start. rd: bit0 busy, bit1 done (sticky)
    REG_CTX      = 5'd1,   // active context
    REG_IBUF_PAT = 5'd2,   // active input buffer pattern
    REG_OBUF_PAT = 5'd3,   // active output buffer pattern
    REG_RD_BASE  = 5'd4,   // first line read
    REG_RD_COUNT = 5'd5,   // lines read
    REG_WR_BASE  = 5'd6,   // first line written
    REG_LATENCY  = 5'd7,   // cycles from the first read to the first write (1..32)
    REG_WR_CYC   = 5'd8,   // write cycles per period
    REG_WR_STALL = 5'd9,   // write stalls per period
    REG_DIR      = 5'd10,  // ping-pong: 0 reads memory 1 and writes memory 2
    REG_CFG_PE   = 5'd11,  // inject a cfg_word_t into the array
    REG_CFG_IBUF = 5'd12,  // write an iobuf_cfg_t of the input buffer
    REG_CFG_OBUF = 5'd13   // write an iobuf_cfg_t of the output buffer
  } reg_e;

endpackage
