// regfile: the 32 x 32-bit register file of the miniMIPS pipeline.
//
// Two read ports (RA1/RD1 for rs, RA2/RD2 for rt) are read combinationally in
// the RF stage; the single write port (WA, WD, WE = WERF) is driven by the WB
// stage and written at the rising clock edge that ends WB. Register $0 always
// reads as zero and writes to it are dropped. A read in the same cycle as a
// write to the same register returns the old value: the pipeline's WB bypass
// supplies the new one, so no write-through is built in here. Synchronous
// reset clears every register; the reset is this implementation's addition.
module regfile
  import minimips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  reg_t  ra1,
  output word_t rd1,
  input  reg_t  ra2,
  output word_t rd2,
  input  logic  we,
  input  reg_t  wa,
  input  word_t wd
);
  word_t regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : regs[ra2];
endmodule
