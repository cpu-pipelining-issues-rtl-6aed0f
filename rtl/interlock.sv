// interlock: load-use interlock of the miniMIPS pipeline.
//
// Load data comes back only in the WB stage, so an RF-stage instruction that
// reads a register a lw in the ALU or MEM stage is about to write cannot get
// its operand by bypassing. In that case stall is raised: the pipeline holds
// PC, PC_REG and IR_REG (clock enables off) and loads a NOP into IR_ALU, so a
// bubble moves down the pipe while the IF and RF stages wait. An instruction
// immediately after a lw waits two cycles, one two slots behind waits one;
// when the lw reaches WB its data is bypassed from the WDSEL mux output.
// Only registers the instruction really reads are compared, and $0 never
// stalls. A lw in MEM is ignored when the instruction in ALU writes the same
// register, since that younger result is the one the bypass will deliver.
// Purely combinational.
module interlock
  import minimips_pkg::*;
(
  input  logic uses_rs,
  input  reg_t rs,
  input  logic uses_rt,
  input  reg_t rt,
  input  logic load_alu,
  input  reg_t dest_alu,
  input  logic load_mem,
  input  reg_t dest_mem,
  output logic stall
);
  function automatic logic hit(input logic used, input reg_t r);
    return used && (r != 5'd0) &&
           ((load_alu && r == dest_alu) ||
            (load_mem && r == dest_mem && r != dest_alu));
  endfunction

  assign stall = hit(uses_rs, rs) || hit(uses_rt, rt);
endmodule
