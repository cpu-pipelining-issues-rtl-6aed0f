// tb_mips_pkg: testbench support for the miniMIPS pipeline.
//
// Holds instruction encoders (a tiny assembler) and iss, an instruction-level
// reference model of the architecture the pipeline implements: one branch
// delay slot after every jump or branch, jal/jalr link to the address after the
// delay slot, and an unknown opcode jumps to 0x80000040 with its address + 8
// in $27. The model also predicts when each instruction occupies the RF stage
// of the pipeline: one per cycle, except that an instruction reading a register
// last written by a lw waits until that lw is three cycles ahead of it.
// The model is written from the instruction set, not from the RTL.
package tb_mips_pkg;

  typedef logic [31:0] u32;

  function automatic u32 enc_r(int fn, int rs, int rt, int rd, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic u32 enc_i(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic u32 enc_j(int op, u32 target);
    return {6'(op), target[27:2]};
  endfunction

  function automatic u32 NOPI();                         return 32'h0; endfunction
  function automatic u32 ADD (int d, int s, int t);      return enc_r('h20, s, t, d); endfunction
  function automatic u32 SUB (int d, int s, int t);      return enc_r('h22, s, t, d); endfunction
  function automatic u32 AND_(int d, int s, int t);      return enc_r('h24, s, t, d); endfunction
  function automatic u32 OR_ (int d, int s, int t);      return enc_r('h25, s, t, d); endfunction
  function automatic u32 XOR_(int d, int s, int t);      return enc_r('h26, s, t, d); endfunction
  function automatic u32 NOR_(int d, int s, int t);      return enc_r('h27, s, t, d); endfunction
  function automatic u32 SLT (int d, int s, int t);      return enc_r('h2a, s, t, d); endfunction
  function automatic u32 SLTU(int d, int s, int t);      return enc_r('h2b, s, t, d); endfunction
  function automatic u32 SLL (int d, int t, int sh);     return enc_r('h00, 0, t, d, sh); endfunction
  function automatic u32 SRL (int d, int t, int sh);     return enc_r('h02, 0, t, d, sh); endfunction
  function automatic u32 SRA (int d, int t, int sh);     return enc_r('h03, 0, t, d, sh); endfunction
  function automatic u32 SLLV(int d, int t, int s);      return enc_r('h04, s, t, d); endfunction
  function automatic u32 SRAV(int d, int t, int s);      return enc_r('h07, s, t, d); endfunction
  function automatic u32 JR  (int s);                    return enc_r('h08, s, 0, 0); endfunction
  function automatic u32 JALR(int d, int s);             return enc_r('h09, s, 0, d); endfunction
  function automatic u32 ADDI(int t, int s, int imm);    return enc_i('h08, s, t, imm); endfunction
  function automatic u32 SLTI(int t, int s, int imm);    return enc_i('h0a, s, t, imm); endfunction
  function automatic u32 ANDI(int t, int s, int imm);    return enc_i('h0c, s, t, imm); endfunction
  function automatic u32 ORI (int t, int s, int imm);    return enc_i('h0d, s, t, imm); endfunction
  function automatic u32 XORI(int t, int s, int imm);    return enc_i('h0e, s, t, imm); endfunction
  function automatic u32 LUI (int t, int imm);           return enc_i('h0f, 0, t, imm); endfunction
  function automatic u32 LW  (int t, int off, int s);    return enc_i('h23, s, t, off); endfunction
  function automatic u32 SW  (int t, int off, int s);    return enc_i('h2b, s, t, off); endfunction
  function automatic u32 BEQ (int s, int t, int off);    return enc_i('h04, s, t, off); endfunction
  function automatic u32 BNE (int s, int t, int off);    return enc_i('h05, s, t, off); endfunction
  function automatic u32 J   (u32 target);               return enc_j('h02, target); endfunction
  function automatic u32 JAL (u32 target);               return enc_j('h03, target); endfunction
  function automatic u32 ILLEGAL();                      return 32'hfc00_0000; endfunction

  localparam u32 BASE = 32'h8000_0000;

  class iss;
    int unsigned imem_words, dmem_words;
    u32 imem[];
    u32 dmem[];
    u32 r[32];
    u32 pc, npc;
    longint unsigned rf_cycle;      // predicted RF cycle of the next instruction
    longint unsigned load_ready[32];
    longint unsigned executed;

    function new(int unsigned iw, int unsigned dw);
      imem_words = iw; dmem_words = dw;
      imem = new[iw]; dmem = new[dw];
      foreach (imem[i]) imem[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 0;
      foreach (load_ready[i]) load_ready[i] = 0;
      pc = BASE; npc = BASE + 4; rf_cycle = 0; executed = 0;
    endfunction

    function int unsigned didx(u32 a); return (a >> 2) % dmem_words; endfunction

    // Execute one instruction; returns the RF cycle the pipeline should use.
    function longint unsigned step();
      u32 ins, target, a, b, res;
      int op, fn, rs, rt, rd, sh, wreg;
      bit jump, use_rs, use_rt, is_load;
      longint unsigned t;
      ins = imem[(pc >> 2) % imem_words];
      op = ins[31:26]; fn = ins[5:0]; rs = ins[25:21]; rt = ins[20:16];
      rd = ins[15:11]; sh = ins[10:6];
      a = r[rs]; b = r[rt];
      jump = 0; target = 0; wreg = 0; res = 0; is_load = 0;
      use_rs = 0; use_rt = 0;
      case (op)
        'h00: begin
          use_rs = 1; use_rt = 1; wreg = rd;
          case (fn)
            'h00: begin res = b << sh; use_rs = 0; end
            'h02: begin res = b >> sh; use_rs = 0; end
            'h03: begin res = u32'($signed(b) >>> sh); use_rs = 0; end
            'h04: res = b << a[4:0];
            'h06: res = b >> a[4:0];
            'h07: res = u32'($signed(b) >>> a[4:0]);
            'h08: begin jump = 1; target = a; wreg = 0; use_rt = 0; end
            'h09: begin jump = 1; target = a; res = pc + 8; use_rt = 0; end
            'h20, 'h21: res = a + b;
            'h22, 'h23: res = a - b;
            'h24: res = a & b;
            'h25: res = a | b;
            'h26: res = a ^ b;
            'h27: res = ~(a | b);
            'h2a: res = ($signed(a) < $signed(b)) ? 1 : 0;
            'h2b: res = (a < b) ? 1 : 0;
            default: begin jump = 1; target = BASE + 'h40; res = pc + 8; wreg = 27; use_rs = 0; use_rt = 0; end
          endcase
        end
        'h02: begin jump = 1; target = {pc[31:28] , ins[25:0], 2'b00}; end
        'h03: begin jump = 1; target = {pc[31:28], ins[25:0], 2'b00}; res = pc + 8; wreg = 31; end
        'h04: begin use_rs = 1; use_rt = 1; if (a == b) begin jump = 1; target = pc + 4 + u32'({{14{ins[15]}}, ins[15:0], 2'b00}); end end
        'h05: begin use_rs = 1; use_rt = 1; if (a != b) begin jump = 1; target = pc + 4 + u32'({{14{ins[15]}}, ins[15:0], 2'b00}); end end
        'h08, 'h09: begin use_rs = 1; wreg = rt; res = a + u32'($signed(ins[15:0])); end
        'h0a: begin use_rs = 1; wreg = rt; res = ($signed(a) < $signed(u32'($signed(ins[15:0])))) ? 1 : 0; end
        'h0b: begin use_rs = 1; wreg = rt; res = (a < u32'($signed(ins[15:0]))) ? 1 : 0; end
        'h0c: begin use_rs = 1; wreg = rt; res = a & {16'h0, ins[15:0]}; end
        'h0d: begin use_rs = 1; wreg = rt; res = a | {16'h0, ins[15:0]}; end
        'h0e: begin use_rs = 1; wreg = rt; res = a ^ {16'h0, ins[15:0]}; end
        'h0f: begin wreg = rt; res = {ins[15:0], 16'h0}; end
        'h23: begin use_rs = 1; wreg = rt; is_load = 1;
                    res = dmem[didx(a + u32'($signed(ins[15:0])))]; end
        'h2b: begin use_rs = 1; use_rt = 1;
                    dmem[didx(a + u32'($signed(ins[15:0])))] = b; end
        default: begin jump = 1; target = BASE + 'h40; res = pc + 8; wreg = 27; end
      endcase
      // timing
      t = rf_cycle;
      if (use_rs && rs != 0 && load_ready[rs] > t) t = load_ready[rs];
      if (use_rt && rt != 0 && load_ready[rt] > t) t = load_ready[rt];
      if (wreg != 0) begin
        r[wreg] = res;
        load_ready[wreg] = is_load ? t + 3 : 0;
      end
      rf_cycle = t + 1;
      executed++;
      pc = npc;
      npc = jump ? target : npc + 4;
      return t;
    endfunction
  endclass

endpackage
