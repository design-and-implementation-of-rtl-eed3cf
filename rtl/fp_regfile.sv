// fp_regfile: the 32 x 32-bit floating-point register file (f0..f31).
//
// It sits in the core's register bank beside the integer file: the decode
// stage reads the two source operands of an FP instruction here and sends
// their values to the coprocessor with the request. One synchronous write
// port is shared by FLW write-back and by coprocessor results; the core
// holds a coprocessor response back while an FLW writes, so the two never
// collide. f0 is an ordinary register. Same-cycle write/read is passed
// through (write-first).
module fp_regfile (
  input  logic        clk,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [32];

  always_ff @(posedge clk)
    if (we) regs[wa] <= wd;

  always_comb begin
    rd1 = (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
