// alu: the 32-bit ALU of the miniMIPS ALU stage.
//
// Computes Y = A op B for the function code ALUFN, and the condition flags
// N, V, C, Z of the subtraction A - B (or of the addition for ALU_ADD), the four
// flag outputs drawn under the ALU. Shifts move B by the amount A[4:0]: the A
// mux supplies rs (variable shifts), the instruction's shamt field, or the
// constant 16, which with BSEL on the immediate and a left shift is how lui is
// done. Set-less-than uses the flags: signed is N xor V, unsigned is not C.
// Purely combinational. Function codes and the flag definitions are this
// implementation's choice; the function names come from the MIPS subset.
module alu
  import minimips_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  alufn_t alufn,
  output word_t  y,
  output logic   n,
  output logic   v,
  output logic   c,
  output logic   z
);
  logic        sub;
  logic [32:0] sum;
  word_t       bx;

  assign sub = (alufn != ALU_ADD);
  assign bx  = sub ? ~b : b;
  assign sum = {1'b0, a} + {1'b0, bx} + 33'(sub);
  assign n   = sum[31];
  assign c   = sum[32];
  assign v   = (a[31] == bx[31]) && (sum[31] != a[31]);
  assign z   = (sum[31:0] == 32'd0);

  always_comb begin
    unique case (alufn)
      ALU_ADD, ALU_SUB: y = sum[31:0];
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, n ^ v};
      ALU_SLTU: y = {31'd0, ~c};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = $signed(b) >>> a[4:0];
      default:  y = sum[31:0];
    endcase
  end
endmodule
