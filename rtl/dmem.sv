// dmem: data memory of the miniMIPS MEM and WB stages.
//
// The address (Adr = Y_MEM) and write data (WD = WD_MEM) are presented during
// the MEM stage, as soon as the instruction enters it. A store (wr = 1) is
// written at the clock edge that ends MEM. A read is registered at that same
// edge and its data (RD) is valid throughout the WB stage, where the WDSEL mux
// picks it up: the read has the MEM cycle plus part of WB to complete. Words
// only; the address is byte-based and bits [AW+1:2] select the word. A second,
// host port (host_we, host_addr, host_wdata, host_rdata) loads and inspects
// the memory from outside; host_rdata is combinational. The size and the host
// port are this implementation's choices.
module dmem
  import minimips_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  word_t         addr,
  input  word_t         wdata,
  input  logic          wr,
  output word_t         rdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  word_t         host_wdata,
  output word_t         host_rdata
);
  word_t mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr)           mem[widx] <= wdata;
    else if (host_we) mem[host_addr] <= host_wdata;
    rdata <= mem[widx];
  end

  assign host_rdata = mem[host_addr];
endmodule
