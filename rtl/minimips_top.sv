// minimips_top: the five-stage pipelined miniMIPS processor.
//
// Stages and pipeline registers (each stage's IR is decoded locally):
//   IF   PC, imem                  -> PC_REG (=PC+4), IR_REG
//   RF   regfile, A/B bypass, BT adder, "=" comparator, PCSEL, ASEL/BSEL
//                                  -> PC_ALU, IR_ALU, A, B, WD_ALU
//   ALU  ALU                       -> PC_MEM, IR_MEM, Y_MEM, WD_MEM
//   MEM  dmem (address = Y_MEM)    -> PC_WB,  IR_WB,  Y_WB   (RD from dmem)
//   WB   WASEL/WDSEL muxes, regfile write
// Control hazards: branches and jumps are resolved in RF from bypassed
// operands, so the next instruction (the delay slot) is always executed. A
// jal/jalr writes the address after its delay slot (PC_WB+4, i.e. the jal's
// address + 8) into $31 (jalr: rd). Data hazards: each of A and B has a bypass
// mux that takes a result from the ALU output, Y_MEM or the WDSEL output
// before the register file is written, and, for linking instructions still in
// ALU or MEM, PC_ALU+4 or PC_MEM+4 from the PC pipeline. Load-use hazards: a lw
// returns data only in WB, so the interlock freezes PC, PC_REG and IR_REG and
// puts a NOP into IR_ALU until the lw reaches WB. An unknown opcode jumps to
// 0x80000040 and leaves its address + 8 in $27.
//
// Interface: clk, synchronous active-high rst (PC goes to 0x80000000 and the
// pipeline fills with NOPs). While in reset a host loads the instruction
// memory through imem_load_* and the data memory through dmem_host_*;
// dmem_host_rdata reads the data memory at any time.
//
// The stage structure, the muxes and their input numbers, the bypass and
// interlock behaviour follow the design; the instruction subset, encodings,
// memory sizes and the trap behaviour for unknown opcodes are this
// implementation's choices. The reference drawing also shows a NOP mux in
// front of IR_MEM with no stated purpose; it is not built here, and neither is
// an interrupt entry at 0x80000080 (PCSEL input 4).
module minimips_top
  import minimips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_load_we,
  input  logic [IAW-1:0] imem_load_addr,
  input  word_t          imem_load_data,
  input  logic           dmem_host_we,
  input  logic [DAW-1:0] dmem_host_addr,
  input  word_t          dmem_host_wdata,
  output word_t          dmem_host_rdata
);
  // ---------------------------------------------------------------- IF
  word_t pc, pc_plus4, instr, next_pc;
  word_t pc_reg, ir_reg;
  logic  stall;

  assign pc_plus4 = pc + 32'd4;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .pc(pc), .instr(instr),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  always_ff @(posedge clk) begin
    if (rst || !stall) pc <= next_pc;
    if (rst) begin
      pc_reg <= RESET_VEC;
      ir_reg <= NOP;
    end else if (!stall) begin
      pc_reg <= pc_plus4;
      ir_reg <= instr;
    end
  end

  // ---------------------------------------------------------------- RF
  ctrl_t    c_rf, c_alu, c_mem, c_wb;
  reg_t     rs, rt;
  word_t    rd1, rd2, byp_a, byp_b, a_mux, b_mux, imm_ext;
  byp_sel_t sel_a, sel_b;
  pcsel_t   pcsel;
  logic     bz;

  word_t pc_alu, ir_alu, a_alu, b_alu, wd_alu, y_alu;
  word_t pc_mem, ir_mem, y_mem, wd_mem;
  word_t pc_wb,  ir_wb,  y_wb,  rd_wb, wd_wb;

  assign rs = ir_reg[25:21];
  assign rt = ir_reg[20:16];

  decoder u_dec_rf (.ir(ir_reg), .c(c_rf));

  regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(rs), .rd1(rd1), .ra2(rt), .rd2(rd2),
    .we(c_wb.werf), .wa(c_wb.dest), .wd(wd_wb)
  );

  bypass_unit u_byp_a (
    .src(rs), .rf_data(rd1),
    .dest_alu(c_alu.dest), .link_alu(c_alu.wdsel == WDSEL_PC4), .y_alu(y_alu), .pc4_alu(pc_alu + 32'd4),
    .dest_mem(c_mem.dest), .link_mem(c_mem.wdsel == WDSEL_PC4), .y_mem(y_mem), .pc4_mem(pc_mem + 32'd4),
    .dest_wb(c_wb.dest), .wd_wb(wd_wb),
    .data(byp_a), .sel(sel_a)
  );

  bypass_unit u_byp_b (
    .src(rt), .rf_data(rd2),
    .dest_alu(c_alu.dest), .link_alu(c_alu.wdsel == WDSEL_PC4), .y_alu(y_alu), .pc4_alu(pc_alu + 32'd4),
    .dest_mem(c_mem.dest), .link_mem(c_mem.wdsel == WDSEL_PC4), .y_mem(y_mem), .pc4_mem(pc_mem + 32'd4),
    .dest_wb(c_wb.dest), .wd_wb(wd_wb),
    .data(byp_b), .sel(sel_b)
  );

  interlock u_ilk (
    .uses_rs(c_rf.uses_rs), .rs(rs), .uses_rt(c_rf.uses_rt), .rt(rt),
    .load_alu(c_alu.mem_rd), .dest_alu(c_alu.dest),
    .load_mem(c_mem.mem_rd), .dest_mem(c_mem.dest),
    .stall(stall)
  );

  branch_unit u_br (
    .rst(rst), .br_kind(c_rf.br_kind), .a(byp_a), .b(byp_b),
    .pc_plus4(pc_plus4), .pc_reg(pc_reg),
    .imm(ir_reg[15:0]), .jidx(ir_reg[25:0]),
    .pcsel(pcsel), .bz(bz), .next_pc(next_pc)
  );

  assign imm_ext = c_rf.sext ? {{16{ir_reg[15]}}, ir_reg[15:0]} : {16'd0, ir_reg[15:0]};

  always_comb begin
    unique case (c_rf.asel)
      ASEL_SHAMT: a_mux = {27'd0, ir_reg[10:6]};
      ASEL_16:    a_mux = 32'd16;
      default:    a_mux = byp_a;
    endcase
  end
  assign b_mux = (c_rf.bsel == BSEL_IMM) ? imm_ext : byp_b;

  always_ff @(posedge clk) begin
    pc_alu <= pc_reg;
    a_alu  <= a_mux;
    b_alu  <= b_mux;
    wd_alu <= byp_b;
    ir_alu <= (rst || stall) ? NOP : ir_reg;  // NOP mux in front of IR_ALU
  end

  // ---------------------------------------------------------------- ALU
  logic fl_n, fl_v, fl_c, fl_z;

  decoder u_dec_alu (.ir(ir_alu), .c(c_alu));

  alu u_alu (
    .a(a_alu), .b(b_alu), .alufn(c_alu.alufn),
    .y(y_alu), .n(fl_n), .v(fl_v), .c(fl_c), .z(fl_z)
  );

  always_ff @(posedge clk) begin
    pc_mem <= pc_alu;
    ir_mem <= rst ? NOP : ir_alu;
    y_mem  <= y_alu;
    wd_mem <= wd_alu;
  end

  // ---------------------------------------------------------------- MEM
  decoder u_dec_mem (.ir(ir_mem), .c(c_mem));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .addr(y_mem), .wdata(wd_mem), .wr(c_mem.mem_wr && !rst), .rdata(rd_wb),
    .host_we(dmem_host_we), .host_addr(dmem_host_addr),
    .host_wdata(dmem_host_wdata), .host_rdata(dmem_host_rdata)
  );

  always_ff @(posedge clk) begin
    pc_wb <= pc_mem;
    ir_wb <= rst ? NOP : ir_mem;
    y_wb  <= y_mem;
  end

  // ---------------------------------------------------------------- WB
  decoder u_dec_wb (.ir(ir_wb), .c(c_wb));

  always_comb begin
    unique case (c_wb.wdsel)
      WDSEL_PC4: wd_wb = pc_wb + 32'd4;
      WDSEL_MEM: wd_wb = rd_wb;
      default:   wd_wb = y_wb;
    endcase
  end

  // An operand the RF instruction really reads is never taken from a load in
  // ALU or MEM: the interlock must have stalled first.
  function automatic logic from_load(byp_sel_t sel);
    return (c_alu.mem_rd && sel == BYP_ALU) || (c_mem.mem_rd && sel == BYP_MEM);
  endfunction

  property p_no_load_bypass;
    @(posedge clk) disable iff (rst)
      !stall |-> !((c_rf.uses_rs && from_load(sel_a)) || (c_rf.uses_rt && from_load(sel_b)));
  endproperty
  a_no_load_bypass: assert property (p_no_load_bypass);
endmodule
