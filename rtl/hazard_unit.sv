// hazard_unit: stall and flush control of the five-stage pipeline.
//
// Three conditions hold the front of the pipeline:
//  * load-use: the instruction in ID reads an integer register that a load
//    in EX is about to fetch. IF and ID hold for one cycle and a bubble
//    enters EX; the loaded value is then forwarded from MEM/WB.
//  * fp_pending: the instruction in ID reads or rewrites an FP register whose
//    value is still being produced (by the coprocessor or by an FLW). IF and
//    ID hold and bubbles enter EX until the register is written.
//  * x_stall: the instruction in EX is an FP request the coprocessor has not
//    accepted. IF, ID and EX hold and a bubble enters MEM.
// A taken branch or jump in EX (redirect) flushes IF/ID and ID/EX; it cannot
// coincide with x_stall because the instruction in EX is then an FP request.
// Purely combinational.
module hazard_unit (
  input  logic       id_valid,
  input  logic       id_uses_rs1,
  input  logic       id_uses_rs2,
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic       idex_valid,
  input  logic       idex_mem_read,
  input  logic       idex_reg_write,
  input  logic [4:0] idex_rd,
  input  logic       fp_pending,
  input  logic       x_stall,
  input  logic       redirect,
  output logic       load_use,
  output logic       stall_pc,
  output logic       stall_ifid,
  output logic       flush_ifid,
  output logic       stall_idex,
  output logic       bubble_idex,
  output logic       bubble_exmem
);
  logic id_hazard;

  always_comb begin
    load_use = id_valid && idex_valid && idex_mem_read && idex_reg_write &&
               idex_rd != 5'd0 &&
               ((id_uses_rs1 && id_rs1 == idex_rd) ||
                (id_uses_rs2 && id_rs2 == idex_rd));
    id_hazard    = load_use || (id_valid && fp_pending);
    stall_pc     = (x_stall || id_hazard) && !redirect;
    flush_ifid   = redirect;
    stall_ifid   = (x_stall || id_hazard) && !redirect;
    stall_idex   = x_stall;
    bubble_idex  = !x_stall && (redirect || id_hazard);
    bubble_exmem = x_stall;
  end
endmodule
