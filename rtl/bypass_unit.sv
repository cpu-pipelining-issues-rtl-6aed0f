// bypass_unit: one operand bypass (A or B) of the miniMIPS RF stage.
//
// The RF-stage source register (rs for the A copy, rt for the B copy) is
// compared, 5 bits at a time, with $0 and with the destination register of the
// instructions now in the ALU, MEM and WB stages. The nearest match wins:
//   src == 0          -> constant 0
//   match ALU stage   -> ALU output, or PC_ALU+4 if that instruction links
//   match MEM stage   -> Y_MEM, or PC_MEM+4 if that instruction links
//   match WB stage    -> WB write data (the WDSEL mux output)
//   otherwise         -> register file read data.
// A "linking" instruction (jal, jalr, illegal-op trap) writes the return
// address from the PC pipeline, so its value is taken from there and not
// from the ALU path. Instructions that write no register (sw, branches, j, jr)
// arrive with destination 0 and never match. So there are six bypass inputs
// plus the register file. A lw in ALU or MEM is not handled here: the
// interlock stalls until the lw reaches WB. Purely combinational.
module bypass_unit
  import minimips_pkg::*;
(
  input  reg_t     src,
  input  word_t    rf_data,
  input  reg_t     dest_alu,
  input  logic     link_alu,
  input  word_t    y_alu,
  input  word_t    pc4_alu,   // PC_ALU + 4
  input  reg_t     dest_mem,
  input  logic     link_mem,
  input  word_t    y_mem,
  input  word_t    pc4_mem,   // PC_MEM + 4
  input  reg_t     dest_wb,
  input  word_t    wd_wb,
  output word_t    data,
  output byp_sel_t sel
);
  logic is_zero, eq_alu, eq_mem, eq_wb;

  assign is_zero = (src == 5'd0);
  assign eq_alu  = (src == dest_alu);
  assign eq_mem  = (src == dest_mem);
  assign eq_wb   = (src == dest_wb);

  always_comb begin
    if (is_zero)     sel = BYP_ZERO;
    else if (eq_alu) sel = link_alu ? BYP_PCALU : BYP_ALU;
    else if (eq_mem) sel = link_mem ? BYP_PCMEM : BYP_MEM;
    else if (eq_wb)  sel = BYP_WB;
    else             sel = BYP_RF;
  end

  always_comb begin
    unique case (sel)
      BYP_ZERO:  data = '0;
      BYP_ALU:   data = y_alu;
      BYP_PCALU: data = pc4_alu;
      BYP_MEM:   data = y_mem;
      BYP_PCMEM: data = pc4_mem;
      BYP_WB:    data = wd_wb;
      default:   data = rf_data;
    endcase
  end
endmodule
