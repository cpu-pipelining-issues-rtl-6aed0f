// decoder: control logic of the miniMIPS pipeline.
//
// Turns a 32-bit instruction word into the control bundle ctrl_t: the ALU
// function (ALUFN), the A and B operand muxes (ASEL, BSEL), immediate extension
// (SEXT), the data memory write strobe (Wr), the write-back address and data
// muxes (WASEL, WDSEL), the register file write enable (WERF), and the kind of
// control transfer the RF stage must perform. It also reports the register the
// instruction writes (dest, 0 when it writes none, e.g. sw, branches, j, jr)
// and which source registers it really reads, which the bypass and interlock
// logic need. Purely combinational; the pipeline instantiates one copy per
// stage and feeds it that stage's IR.
//
// The control signal names and mux input numbers are those of the datapath
// drawing; the instruction subset, the ALU codes and the treatment of an
// unknown opcode (a jump to 0x80000040 that saves PC+8 in $27, like a jal
// with its own link register) are choices of this implementation.
module decoder
  import minimips_pkg::*;
(
  input  word_t ir,
  output ctrl_t c
);
  logic [5:0] op, fn;
  reg_t       rt, rd;

  assign op = ir[31:26];
  assign fn = ir[5:0];
  assign rt = ir[20:16];
  assign rd = ir[15:11];

  always_comb begin
    c         = '0;
    c.br_kind = BR_NONE;
    c.asel    = ASEL_RS;
    c.bsel    = BSEL_RT;
    c.sext    = 1'b1;
    c.alufn   = ALU_ADD;
    c.wasel   = WASEL_RT;
    c.wdsel   = WDSEL_ALU;
    unique case (op)
      OP_RTYPE: begin
        c.werf    = 1'b1;
        c.wasel   = WASEL_RD;
        c.uses_rs = 1'b1;
        c.uses_rt = 1'b1;
        unique case (fn)
          FN_SLL:  begin c.alufn = ALU_SLL; c.asel = ASEL_SHAMT; c.uses_rs = 1'b0; end
          FN_SRL:  begin c.alufn = ALU_SRL; c.asel = ASEL_SHAMT; c.uses_rs = 1'b0; end
          FN_SRA:  begin c.alufn = ALU_SRA; c.asel = ASEL_SHAMT; c.uses_rs = 1'b0; end
          FN_SLLV: c.alufn = ALU_SLL;
          FN_SRLV: c.alufn = ALU_SRL;
          FN_SRAV: c.alufn = ALU_SRA;
          FN_JR:   begin c.br_kind = BR_JR; c.werf = 1'b0; c.uses_rt = 1'b0; end
          FN_JALR: begin c.br_kind = BR_JR; c.wdsel = WDSEL_PC4; c.uses_rt = 1'b0; end
          FN_ADD, FN_ADDU: c.alufn = ALU_ADD;
          FN_SUB, FN_SUBU: c.alufn = ALU_SUB;
          FN_AND:  c.alufn = ALU_AND;
          FN_OR:   c.alufn = ALU_OR;
          FN_XOR:  c.alufn = ALU_XOR;
          FN_NOR:  c.alufn = ALU_NOR;
          FN_SLT:  c.alufn = ALU_SLT;
          FN_SLTU: c.alufn = ALU_SLTU;
          default: c.illegal = 1'b1;
        endcase
      end
      OP_J:    c.br_kind = BR_J;
      OP_JAL:  begin c.br_kind = BR_J; c.werf = 1'b1; c.wasel = WASEL_31; c.wdsel = WDSEL_PC4; end
      OP_BEQ:  begin c.br_kind = BR_EQ; c.uses_rs = 1'b1; c.uses_rt = 1'b1; end
      OP_BNE:  begin c.br_kind = BR_NE; c.uses_rs = 1'b1; c.uses_rt = 1'b1; end
      OP_ADDI, OP_ADDIU: begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; end
      OP_SLTI: begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.alufn = ALU_SLT; end
      OP_SLTIU:begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.alufn = ALU_SLTU; end
      OP_ANDI: begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.alufn = ALU_AND; c.sext = 1'b0; end
      OP_ORI:  begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.alufn = ALU_OR;  c.sext = 1'b0; end
      OP_XORI: begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.alufn = ALU_XOR; c.sext = 1'b0; end
      OP_LUI:  begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.asel = ASEL_16; c.alufn = ALU_SLL; c.sext = 1'b0; end
      OP_LW:   begin c.werf = 1'b1; c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.mem_rd = 1'b1; c.wdsel = WDSEL_MEM; end
      OP_SW:   begin c.bsel = BSEL_IMM; c.uses_rs = 1'b1; c.uses_rt = 1'b1; c.mem_wr = 1'b1; end
      default: c.illegal = 1'b1;
    endcase
    if (c.illegal) begin
      c         = '0;
      c.illegal = 1'b1;
      c.br_kind = BR_ILLOP;
      c.asel    = ASEL_RS;
      c.bsel    = BSEL_RT;
      c.sext    = 1'b1;
      c.alufn   = ALU_ADD;
      c.werf    = 1'b1;
      c.wasel   = WASEL_27;
      c.wdsel   = WDSEL_PC4;
    end
    // Destination register as selected by WASEL; 0 when nothing is written.
    if (c.werf) begin
      unique case (c.wasel)
        WASEL_RT: c.dest = rt;
        WASEL_RD: c.dest = rd;
        WASEL_31: c.dest = REG_RA;
        WASEL_27: c.dest = REG_XP;
      endcase
    end else begin
      c.dest = 5'd0;
    end
  end
endmodule
