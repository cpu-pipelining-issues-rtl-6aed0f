// minimips_pkg: types and constants shared by the miniMIPS pipeline.
//
// The machine is a 32-bit MIPS subset. The pipeline carries the instruction
// word (IR) down through its five stages and every stage decodes the fields it
// needs; the decoded control bundle is the struct ctrl_t below. The mux select
// encodings (PCSEL, ASEL, BSEL, WASEL, WDSEL) follow the input numbering printed
// on the datapath drawing of the design; the ALU function code, the branch kind
// and the bypass source encodings are choices of this implementation.
package minimips_pkg;

  typedef logic [31:0] word_t;
  typedef logic [4:0]  reg_t;

  // All-zero word: sll $0,$0,0. Writes only $0, so it changes no state.
  localparam word_t NOP = 32'h0000_0000;

  // Fixed PC values at PCSEL inputs 6, 5 and 4.
  localparam word_t RESET_VEC = 32'h8000_0000;
  localparam word_t ILLOP_VEC = 32'h8000_0040;
  localparam word_t XADR_VEC  = 32'h8000_0080;

  // Register numbers selected by WASEL inputs 2 and 3.
  localparam reg_t REG_RA = 5'd31;
  localparam reg_t REG_XP = 5'd27;

  // Opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQ   = 6'h04, OP_BNE  = 6'h05, OP_ADDI = 6'h08,
                         OP_ADDIU = 6'h09, OP_SLTI = 6'h0a, OP_SLTIU= 6'h0b,
                         OP_ANDI  = 6'h0c, OP_ORI  = 6'h0d, OP_XORI = 6'h0e,
                         OP_LUI   = 6'h0f, OP_LW   = 6'h23, OP_SW   = 6'h2b;

  // R-type function codes (instruction bits 5:0).
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
                         FN_JR   = 6'h08, FN_JALR = 6'h09, FN_ADD  = 6'h20,
                         FN_ADDU = 6'h21, FN_SUB  = 6'h22, FN_SUBU = 6'h23,
                         FN_AND  = 6'h24, FN_OR   = 6'h25, FN_XOR  = 6'h26,
                         FN_NOR  = 6'h27, FN_SLT  = 6'h2a, FN_SLTU = 6'h2b;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA
  } alufn_t;

  typedef enum logic [2:0] {
    PCSEL_PLUS4 = 3'd0, PCSEL_BT    = 3'd1, PCSEL_JT    = 3'd2,
    PCSEL_JUMP  = 3'd3, PCSEL_XADR  = 3'd4, PCSEL_ILLOP = 3'd5,
    PCSEL_RESET = 3'd6
  } pcsel_t;

  // What kind of control transfer an instruction asks for in the RF stage.
  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_JR, BR_J, BR_ILLOP
  } br_kind_t;

  typedef enum logic [1:0] { ASEL_RS = 2'd0, ASEL_SHAMT = 2'd1, ASEL_16 = 2'd2 } asel_t;
  typedef enum logic       { BSEL_RT = 1'b0, BSEL_IMM = 1'b1 } bsel_t;
  typedef enum logic [1:0] { WASEL_RT = 2'd0, WASEL_RD = 2'd1, WASEL_31 = 2'd2, WASEL_27 = 2'd3 } wasel_t;
  typedef enum logic [1:0] { WDSEL_PC4 = 2'd0, WDSEL_ALU = 2'd1, WDSEL_MEM = 2'd2 } wdsel_t;

  // Operand source chosen by a bypass mux.
  typedef enum logic [2:0] {
    BYP_RF, BYP_ZERO, BYP_ALU, BYP_MEM, BYP_WB, BYP_PCALU, BYP_PCMEM
  } byp_sel_t;

  typedef struct packed {
    br_kind_t br_kind;  // control transfer resolved in RF
    asel_t    asel;
    bsel_t    bsel;
    logic     sext;     // 1: sign-extend imm, 0: zero-extend
    alufn_t   alufn;
    logic     mem_rd;   // lw
    logic     mem_wr;   // sw (Wr)
    wasel_t   wasel;
    wdsel_t   wdsel;
    logic     werf;     // writes the register file
    reg_t     dest;     // register written, 5'd0 when none
    logic     uses_rs;
    logic     uses_rt;
    logic     illegal;
  } ctrl_t;

endpackage
