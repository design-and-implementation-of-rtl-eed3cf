// forwarding_unit: operand bypass selection for the EX stage.
//
// For each integer source of the instruction in EX it returns a 2-bit select:
// 2'b10 takes the result in EX/MEM, 2'b01 the value being written back from
// MEM/WB, 2'b00 the value read from the register file. The younger EX/MEM
// result wins when both match; x0 is never forwarded. Purely combinational.
module forwarding_unit (
  input  logic [4:0] idex_rs1,
  input  logic [4:0] idex_rs2,
  input  logic [4:0] exmem_rd,
  input  logic       exmem_we,
  input  logic [4:0] memwb_rd,
  input  logic       memwb_we,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);
  function automatic logic [1:0] sel(input logic [4:0] rs);
    if (exmem_we && exmem_rd != 5'd0 && exmem_rd == rs)      return 2'b10;
    else if (memwb_we && memwb_rd != 5'd0 && memwb_rd == rs) return 2'b01;
    else                                                     return 2'b00;
  endfunction

  assign fwd_a = sel(idex_rs1);
  assign fwd_b = sel(idex_rs2);
endmodule
