// psb_pkg: shared types and sizes of the path-selection-branch (PSB) CGRA.
//
// The CGRA is a 4x4 torus of processing elements (PEs). Every cycle the
// instruction fetch unit (IFU) issues one instruction word to every PE. A
// branch instruction on the designated PE sends its outcome and the length K
// of the conditional paths to the IFU, which then issues only the path that
// the branch selected. The 4x4 size follows the evaluated design; the data
// width, the register-file sizes and the whole instruction encoding below are
// choices of this implementation, since the design only states that an
// instruction names an operation, the position of its operands and an
// immediate constant.
package psb_pkg;

  // Array size (4x4 torus).
  localparam int unsigned ROWS   = 4;
  localparam int unsigned COLS   = 4;
  localparam int unsigned NPE    = ROWS * COLS;

  // Datapath and storage sizes.
  localparam int unsigned DW     = 32;   // data word width
  localparam int unsigned RF_N   = 4;    // data registers per PE
  localparam int unsigned PRF_N  = 4;    // predicate registers per PE
  localparam int unsigned RF_AW  = $clog2(RF_N);
  localparam int unsigned PRF_AW = $clog2(PRF_N);
  localparam int unsigned IMM_W  = 16;   // immediate field, sign-extended
  localparam int unsigned K_W    = 4;    // branch path length field

  // Instruction memory / data memory sizes.
  localparam int unsigned IMEM_DEPTH = 64;
  localparam int unsigned DMEM_DEPTH = 256;  // words per row bank
  localparam int unsigned DA_W       = $clog2(DMEM_DEPTH);

  // FU operations.
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,   // idle: nothing is written
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_MUL   = 5'd3,
    OP_AND   = 5'd4,
    OP_OR    = 5'd5,
    OP_XOR   = 5'd6,
    OP_SHL   = 5'd7,
    OP_SRL   = 5'd8,
    OP_SRA   = 5'd9,
    OP_MOV   = 5'd10,  // route operand A to the output register
    OP_SEL   = 5'd11,  // partial-predication select: p ? A : B
    OP_LT    = 5'd12,  // signed A < B, result to data and predicate
    OP_LTU   = 5'd13,
    OP_EQ    = 5'd14,
    OP_NE    = 5'd15,
    OP_LOAD  = 5'd16,  // out <= mem[A]
    OP_STORE = 5'd17,  // mem[A] <= B
    OP_BLT   = 5'd18,  // branch to IFU: outcome = (A < B) signed, path length K
    OP_BRP   = 5'd19   // branch to IFU: outcome = selected predicate, length K
  } op_e;

  // Data operand sources: the four torus neighbours, the PE's own output
  // register, its register file, its row data bus and the immediate field.
  typedef enum logic [2:0] {
    SRC_N    = 3'd0,
    SRC_S    = 3'd1,
    SRC_E    = 3'd2,
    SRC_W    = 3'd3,
    SRC_SELF = 3'd4,
    SRC_RF   = 3'd5,
    SRC_BUS  = 3'd6,
    SRC_IMM  = 3'd7
  } src_e;

  // Predicate sources: neighbours' predicate outputs, own predicate output,
  // the predicate register file, or constant true.
  typedef enum logic [2:0] {
    PSRC_N    = 3'd0,
    PSRC_S    = 3'd1,
    PSRC_E    = 3'd2,
    PSRC_W    = 3'd3,
    PSRC_SELF = 3'd4,
    PSRC_PRF  = 3'd5,
    PSRC_ONE  = 3'd6,
    PSRC_ZERO = 3'd7
  } psrc_e;

  // One PE instruction word.
  typedef struct packed {
    op_e                op;
    src_e               src_a;
    src_e               src_b;
    psrc_e              src_p;
    logic [RF_AW-1:0]   rf_ra;    // register read address for an SRC_RF operand A
    logic [RF_AW-1:0]   rf_rb;    // register read address for an SRC_RF operand B
    logic               rf_we;    // write the result into the register file
    logic [RF_AW-1:0]   rf_wa;
    logic [PRF_AW-1:0]  prf_a;    // predicate register read/write address
    logic               prf_we;   // write predicate (compare result or routed p)
    logic [K_W-1:0]     k;        // branch path length in cycles
    logic [IMM_W-1:0]   imm;
  } instr_t;


  localparam instr_t INSTR_NOP = '{op: OP_NOP, src_a: SRC_N, src_b: SRC_N,
                                   src_p: PSRC_ONE, default: '0};

  // Branch information sent from a PE to the IFU (registered in the PE).
  typedef struct packed {
    logic           valid;   // a branch executed in the previous cycle
    logic           taken;   // outcome: 1 = condition true (if-path)
    logic [K_W-1:0] k;       // cycles of each conditional path
  } br_info_t;

  // Memory request of a PE on its row bus.
  typedef struct packed {
    logic            req;
    logic            we;
    logic [DA_W-1:0] addr;
    logic [DW-1:0]   wdata;
  } mem_req_t;

endpackage
