// if_stage: program counter of the fetch stage.
//
// The PC resets to RESET_PC and advances by 4 every cycle. A taken branch or
// jump resolved in EX (redirect) loads the target on the next edge and wins
// over a stall; a stall from the hazard logic holds the PC. Synchronous
// active-low reset.
module if_stage #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  logic        redirect,
  input  logic [31:0] target,
  output logic [31:0] pc
);
  always_ff @(posedge clk)
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (!stall)   pc <= pc + 32'd4;
endmodule
