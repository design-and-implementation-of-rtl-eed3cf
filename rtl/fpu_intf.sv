// fpu_intf: core-side bookkeeping of the coprocessor interface.
//
// Because the coprocessor runs ahead of the pipeline, the core must know
// which FP registers still wait for a value. busy[r] is set when an
// instruction that will write FP register r (an FP operation sent to the
// coprocessor, or an FLW) leaves decode, and cleared when that value is
// written: by FLW write-back (port a) or by an accepted coprocessor response
// (port b). The hazard unit stalls decode on a set bit. The exception flags
// returned with every accepted response are OR-ed into the sticky fflags
// register {NV, DZ, OF, UF, NX}. 32 + 5 flip-flops; synchronous active-low
// reset. The set and the clears never name the same register in one cycle
// (decode stalls while the bit is set), and a clear wins if they did.
module fpu_intf (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        set_en,
  input  logic [4:0]  set_rd,
  input  logic        clr_a_en,
  input  logic [4:0]  clr_a_rd,
  input  logic        clr_b_en,
  input  logic [4:0]  clr_b_rd,
  input  logic [4:0]  flags_in,
  output logic [31:0] busy,
  output logic [4:0]  fflags
);
  logic [31:0] set_vec, clr_vec;

  always_comb begin
    set_vec = set_en   ? (32'd1 << set_rd)   : 32'd0;
    clr_vec = (clr_a_en ? (32'd1 << clr_a_rd) : 32'd0) |
              (clr_b_en ? (32'd1 << clr_b_rd) : 32'd0);
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      busy   <= '0;
      fflags <= '0;
    end else begin
      busy <= (busy | set_vec) & ~clr_vec;
      if (clr_b_en) fflags <= fflags | flags_in;
    end
endmodule
