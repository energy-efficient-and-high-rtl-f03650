// rsf_pkg: sizes, context-word and control-data formats shared by the
// ring-based sharing fabric (RSF) multi-CGRA.
//
// Sizes follow the single-CGRA figures of the published RSF architecture: 16-bit PE registers,
// four registers per PE, a 4x4 PE array, 32-bit configuration elements
// (CEs) of 64 layers, and a data buffer (DB) of two sets of three banks,
// each bank dual-ported as 32-bit x 64 (port A) and 64-bit x 32 (port B).
// The bit layout of the context word and of the control data is this
// design's own: the fields of the control data are the ones the published
// architecture names (execution cycles, read/write mode, DB and CE addresses, Partner,
// Sender, Receiver, Head, Tail, DB_Sel, CM_Sel), their widths and order
// are chosen here.
package rsf_pkg;

  // ---------------- PE array ----------------
  parameter int unsigned DATA_W  = 16;               // PE register width
  parameter int unsigned NREG    = 4;                // registers per PE
  parameter int unsigned PA_ROWS = 4;
  parameter int unsigned PA_COLS = 4;
  parameter int unsigned NUM_PE  = PA_ROWS * PA_COLS;

  // ---------------- configuration memory ----------------
  parameter int unsigned CE_W      = 32;             // context word width
  parameter int unsigned CM_LAYERS = 64;             // layers per CE
  parameter int unsigned CM_AW     = $clog2(CM_LAYERS);
  parameter int unsigned CTX_BUS_W = NUM_PE * CE_W;  // one layer of all CEs

  // ---------------- data buffer ----------------
  parameter int unsigned DB_SETS    = 2;
  parameter int unsigned DB_BANKS   = 3;             // bank 0 write, banks 1,2 read
  parameter int unsigned BANK_A_W   = 32;
  parameter int unsigned BANK_A_DEP = 64;
  parameter int unsigned BANK_B_W   = 64;            // = PA_COLS * DATA_W
  parameter int unsigned BANK_B_DEP = 32;
  parameter int unsigned BANK_A_AW  = $clog2(BANK_A_DEP);
  parameter int unsigned BANK_B_AW  = $clog2(BANK_B_DEP);
  parameter int unsigned BUS_W      = PA_COLS * DATA_W; // PA result / operand bus

  // ---------------- execution controller ----------------
  parameter int unsigned NUM_ENTRIES = 4;            // control-data entries per EC
  parameter int unsigned CYC_W       = $clog2(CM_LAYERS) + 1; // execution cycles 1..64
  parameter int unsigned ITER_W      = 9;            // iterations per entry, up to 511

  // PE operations (4-bit opcode field of the context word)
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // hold output and registers
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,   // low 16 bits of the product
    OP_AND  = 4'd4,
    OP_OR   = 4'd5,
    OP_XOR  = 4'd6,
    OP_SHL  = 4'd7,   // a << b[3:0]
    OP_SHR  = 4'd8,   // a >> b[3:0], logical
    OP_SRA  = 4'd9,   // a >>> b[3:0], arithmetic
    OP_MIN  = 4'd10,  // signed
    OP_MAX  = 4'd11,  // signed
    OP_ABSD = 4'd12,  // |a - b|, signed
    OP_PASS = 4'd13,  // a
    OP_MAC  = 4'd14   // a * b + out_q
  } op_e;

  // Operand sources (4-bit fields of the context word)
  typedef enum logic [3:0] {
    SRC_R0   = 4'd0,
    SRC_R1   = 4'd1,
    SRC_R2   = 4'd2,
    SRC_R3   = 4'd3,
    SRC_N    = 4'd4,   // output of the PE above
    SRC_S    = 4'd5,   // output of the PE below
    SRC_W    = 4'd6,   // output of the PE to the left
    SRC_E    = 4'd7,   // output of the PE to the right
    SRC_DB0  = 4'd8,   // DB read bus 0, word of this column
    SRC_DB1  = 4'd9,   // DB read bus 1, word of this column
    SRC_RING = 4'd10,  // result of the upstream PA, word of this column
    SRC_IMM  = 4'd11,
    SRC_OUT  = 4'd12,  // own output register
    SRC_ZERO = 4'd13,
    SRC_RROW = 4'd14   // result of the upstream PA, word of this row
  } src_e;

  // 32-bit context word held in one CE layer
  typedef struct packed {
    op_e               op;       // [31:28]
    src_e              src_a;    // [27:24]
    src_e              src_b;    // [23:20]
    logic [1:0]        dst;      // [19:18] register written when reg_we
    logic              reg_we;   // [17]
    logic              out_we;   // [16]
    logic [DATA_W-1:0] imm;      // [15:0]
  } ctx_t;

  // Control data of one EC entry (one kernel on one PA for a run of iterations)
  typedef struct packed {
    logic [CYC_W-1:0]     exec_cycles; // layers executed per iteration (1..64)
    logic [ITER_W-1:0]    iterations;  // 0 marks the end of the entry list
    logic [CM_AW-1:0]     cm_base;     // first CE layer of the kernel
    logic [BANK_B_AW-1:0] db_rd_base;  // DB line read in iteration 0
    logic [BANK_B_AW-1:0] db_wr_base;  // DB line written in iteration 0
    logic                 db_rd;       // read mode: fetch operands each iteration
    logic                 db_wr;       // write mode: store the result each iteration
    logic                 db_set;      // DB set used inside the selected DB
    logic                 cm_sel;      // 0: CM of index k-1, 1: CM of index k
    logic                 db_sel;      // 0: DB of index k-1, 1: DB of index k
    logic                 partner;     // upstream neighbour: 0 = tile k-1, 1 = tile k+1
    logic                 sender;      // sends Intermediate Done
    logic                 receiver;    // waits for Intermediate Done
    logic                 head;        // first kernel of the stream
    logic                 tail;        // last kernel of the stream
  } ctrl_t;

  // Request of one EC to a CM
  typedef struct packed {
    logic             req;
    logic [CM_AW-1:0] addr;
  } cm_req_t;

  // Request of one EC to a DB (PA side, port B of the banks)
  typedef struct packed {
    logic                 req;
    logic                 set;
    logic                 rd;
    logic [BANK_B_AW-1:0] rd_addr;
    logic                 we;
    logic [BANK_B_AW-1:0] wr_addr;
    logic [BUS_W-1:0]     wdata;
  } db_req_t;

  // Transfer (DMA) access to a DB through port A of one bank
  typedef struct packed {
    logic                 en;
    logic                 we;
    logic                 set;
    logic [1:0]           bank;
    logic [BANK_A_AW-1:0] addr;
    logic [BANK_A_W-1:0]  wdata;
  } dma_req_t;

endpackage
