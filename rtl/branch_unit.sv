// branch_unit: early branch resolution and PC selection (RF stage).
//
// Branches and jumps are decided while the instruction is in the RF stage,
// using the bypassed operands, so exactly one instruction, the one already
// fetched (the delay slot), follows them and is always executed. The unit
// holds the parts drawn around the PC mux:
//   BT  = PC_REG + SEXT(imm) * 4          (PC_REG is the branch's address + 4)
//   BZ  = (A == B), the "=" comparator
//   JT  = A (jr, jalr)
//   J   = {PC_REG[31:28], J<25:0>, 00}   (j, jal)
// and the 7-input PCSEL mux: 0 PC+4, 1 BT, 2 JT, 3 J, 4 0x80000080,
// 5 0x80000040, 6 0x80000000. Reset selects input 6; an illegal instruction
// selects input 5. Input 4 (0x80000080) belongs to an interrupt entry whose
// sequencing is not part of this implementation; the mux keeps the input but
// no instruction selects it.
// Purely combinational.
module branch_unit
  import minimips_pkg::*;
(
  input  logic     rst,
  input  br_kind_t br_kind,
  input  word_t    a,
  input  word_t    b,
  input  word_t    pc_plus4,  // IF-stage PC + 4
  input  word_t    pc_reg,    // RF-stage instruction address + 4
  input  logic [15:0] imm,
  input  logic [25:0] jidx,
  output pcsel_t   pcsel,
  output logic     bz,
  output word_t    next_pc
);
  word_t bt, jt, jmp;

  assign bt  = pc_reg + {{14{imm[15]}}, imm, 2'b00};
  assign jt  = a;
  assign jmp = {pc_reg[31:28], jidx, 2'b00};
  assign bz  = (a == b);

  always_comb begin
    if (rst) pcsel = PCSEL_RESET;
    else begin
      unique case (br_kind)
        BR_EQ:    pcsel = bz  ? PCSEL_BT : PCSEL_PLUS4;
        BR_NE:    pcsel = !bz ? PCSEL_BT : PCSEL_PLUS4;
        BR_JR:    pcsel = PCSEL_JT;
        BR_J:     pcsel = PCSEL_JUMP;
        BR_ILLOP: pcsel = PCSEL_ILLOP;
        default:  pcsel = PCSEL_PLUS4;
      endcase
    end
  end

  always_comb begin
    unique case (pcsel)
      PCSEL_PLUS4: next_pc = pc_plus4;
      PCSEL_BT:    next_pc = bt;
      PCSEL_JT:    next_pc = jt;
      PCSEL_JUMP:  next_pc = jmp;
      PCSEL_XADR:  next_pc = XADR_VEC;
      PCSEL_ILLOP: next_pc = ILLOP_VEC;
      default:     next_pc = RESET_VEC;
    endcase
  end
endmodule
