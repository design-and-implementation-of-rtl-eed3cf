// instr_mem: instruction memory of the RV32I core.
//
// A WORDS x 32-bit array read combinationally by the fetch PC (byte address,
// word aligned; the index wraps modulo WORDS) so that fetch completes in one
// cycle. A synchronous write port loads a program before or while the core
// is held in reset. The memory size is this design's choice; the write port
// exists so that a test bench or boot loader can place code.
module instr_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic [31:0] raddr,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW+1:2]] <= wdata;

  assign rdata = mem[raddr[AW+1:2]];
endmodule
