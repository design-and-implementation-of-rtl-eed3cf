// int_regfile: the 32 x 32-bit integer register file of RV32I.
//
// Two combinational read ports for the decode stage and one synchronous
// write port from write-back. x0 always reads zero and ignores writes. A
// write in the same cycle as a read of the same register is passed straight
// to the reader (write-first), so write-back needs no separate forwarding
// path into decode.
module int_regfile (
  input  logic        clk,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [1:31];

  always_ff @(posedge clk)
    if (we && wa != 5'd0) regs[wa] <= wd;

  always_comb begin
    rd1 = (ra1 == 5'd0) ? 32'd0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? 32'd0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
