// data_mem: data memory used by the MEM stage.
//
// WORDS x 32-bit array, byte addressed. Writes are synchronous with four byte
// enables (the caller places byte and halfword data in the right lanes);
// reads return the whole aligned word combinationally, and the load path of
// the core selects and extends the bytes it needs. A second read port lets a
// test bench or debugger inspect memory without disturbing the core. Index
// bits above log2(WORDS) are ignored. Size and the combinational read are
// this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we)
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[addr[AW+1:2]][8*i +: 8] <= wdata[8*i +: 8];

  assign rdata     = mem[addr[AW+1:2]];
  assign dbg_rdata = mem[dbg_addr[AW+1:2]];
endmodule
