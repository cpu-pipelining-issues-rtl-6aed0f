// imem: instruction memory of the miniMIPS IF stage.
//
// WORDS 32-bit words, addressed by PC bits [AW+1:2]; the upper PC bits are
// ignored, so the reset vector 0x80000000 reads word 0, 0x80000040 word 16.
// The fetch port reads combinationally within the IF cycle and its data is
// captured in IR_REG at the end of the cycle. A host port (load_we, load_addr,
// load_data) writes words, one per clock, and is meant for loading a program
// while the processor is held in reset. The size and the load port are this
// implementation's choices.
module imem
  import minimips_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  word_t         pc,
  output word_t         instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  word_t         load_data
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[pc[AW+1:2]];
endmodule
