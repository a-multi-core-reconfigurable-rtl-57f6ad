// cgra_pkg: types and constants shared by the multi-core platform and its
// shared coarse-grained reconfigurable array (CGRA) accelerator.
//
// Word sizes, the configuration word encodings and the kernel header layout
// are this design's own choices; the document fixes the structure (ALU plus
// 4-word register file per cell, operands from the register file, the ALU
// output or neighbouring cells, column-wise program counters, a DMA that
// streams kernel inputs and outputs, kernel parameters passed through
// memory-mapped registers) but not the encodings.
package cgra_pkg;

  // Data path width of cores, memories and reconfigurable cells.
  localparam int unsigned DATA_W = 16;
  // Word address width of the data memory space seen by a core.
  localparam int unsigned ADDR_W = 16;
  // Width of one Configuration RAM word.
  localparam int unsigned CFG_W = 32;
  // Width of the row selector in a column control word (up to 8 rows).
  localparam int unsigned ROWSEL_W = 3;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // ALU operations of a reconfigurable cell.
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // hold output register, no register file write
    OP_PASS = 4'd1,   // out = a
    OP_ADD  = 4'd2,
    OP_SUB  = 4'd3,   // a - b
    OP_MUL  = 4'd4,   // low half of signed a*b
    OP_MULH = 4'd5,   // high half of signed a*b (Q15 style fixed point)
    OP_AND  = 4'd6,
    OP_OR   = 4'd7,
    OP_XOR  = 4'd8,
    OP_SHL  = 4'd9,   // a << b[3:0]
    OP_SRL  = 4'd10,  // logical a >> b[3:0]
    OP_SRA  = 4'd11,  // arithmetic a >>> b[3:0]
    OP_MIN  = 4'd12,  // signed minimum
    OP_MAX  = 4'd13,  // signed maximum
    OP_ABS  = 4'd14,  // |a|
    OP_SLT  = 4'd15   // signed a < b ? 1 : 0
  } alu_op_e;

  // Operand sources of a reconfigurable cell.
  typedef enum logic [3:0] {
    SRC_R0   = 4'd0,
    SRC_R1   = 4'd1,
    SRC_R2   = 4'd2,
    SRC_R3   = 4'd3,
    SRC_SELF = 4'd4,  // own ALU output register
    SRC_N    = 4'd5,  // output of the cell above (row - 1)
    SRC_S    = 4'd6,  // output of the cell below (row + 1)
    SRC_E    = 4'd7,  // output of the cell to the right (column + 1)
    SRC_W    = 4'd8,  // output of the cell to the left (column - 1)
    SRC_IN   = 4'd9,  // head of the kernel's DMA input stream
    SRC_IMM  = 4'd10  // sign-extended immediate of the configuration word
  } src_e;

  // Configuration word of one reconfigurable cell for one schedule step.
  typedef struct packed {
    alu_op_e     op;
    src_e        a;
    src_e        b;
    logic        rf_we;   // write the ALU result into the register file
    logic [1:0]  rf_wa;   // register written
    logic [7:0]  imm;
  } rc_cfg_t;             // 23 bits

  // Column control word for one schedule step. Only the word of the leftmost
  // (leader) column of a kernel drives the kernel's DMA streams.
  typedef struct packed {
    logic                pop;     // consume one word of the input stream
    logic                push;    // emit the output of row out_row
    logic [ROWSEL_W-1:0] out_row;
  } col_cfg_t;            // 5 bits

  // Kernel header, stored in Configuration RAM at address <kernel id>.
  typedef struct packed {
    logic [7:0]  len;     // schedule length (configuration words per cell)
    logic [3:0]  ncols;   // number of adjacent columns the kernel occupies
    logic [3:0]  rsvd;
    logic [15:0] base;    // Configuration RAM address of the kernel's words
  } kernel_hdr_t;

  // Kernel invocation parameters, written by a core into memory-mapped
  // registers before it issues ACCEL.
  typedef struct packed {
    addr_t in_addr;
    word_t in_len;
    addr_t out_addr;
    word_t out_len;
    word_t iters;
  } kparam_t;

  // Core identifier width (up to 16 cores) and column index width.
  localparam int unsigned CORE_W = 4;
  localparam int unsigned COL_W  = 4;

  // A kernel request granted by the CGRA controller to the CGRA.
  typedef struct packed {
    logic [CORE_W-1:0] core;       // requesting core = DMA channel
    kernel_hdr_t       hdr;
    logic [COL_W-1:0]  col_start;  // first (leader) column assigned
    kparam_t           prm;
  } accel_req_t;

  // Memory-mapped register offsets of the kernel parameters.
  localparam int unsigned REG_IN_ADDR  = 0;
  localparam int unsigned REG_IN_LEN   = 1;
  localparam int unsigned REG_OUT_ADDR = 2;
  localparam int unsigned REG_OUT_LEN  = 3;
  localparam int unsigned REG_ITERS    = 4;

  // Synchronizer operations (the synchronization instructions of a core).
  typedef enum logic [1:0] {
    SYNC_INC   = 2'd0,   // increment the counter of a synchronization point
    SYNC_DEC   = 2'd1,   // decrement it
    SYNC_SLEEP = 2'd2,   // clock-gate the core until the counter is zero
    SYNC_NOP   = 2'd3
  } sync_op_e;

  // Packs a cell configuration word into a Configuration RAM word.
  function automatic logic [CFG_W-1:0] pack_rc(alu_op_e op, src_e a, src_e b,
                                               logic we, logic [1:0] wa,
                                               logic [7:0] imm);
    rc_cfg_t c;
    c = '{op: op, a: a, b: b, rf_we: we, rf_wa: wa, imm: imm};
    return CFG_W'(c);
  endfunction

endpackage
