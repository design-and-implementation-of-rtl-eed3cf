// ext_fpu: the clock-gated floating-point coprocessor (IEEE-754 single).
//
// Structure: a control unit (fpu_ctrl) that holds the request/response
// handshake and latches operands; an adder/subtractor, a multiplier and an
// iterative divider that each produce an unrounded result; one shared
// normalisation/rounding stage after the unit-select multiplexer that forms
// the response data and its exception flags. Each of the four parts runs on
// its own flip-flop clock gate (clock_gate), so only the unit doing work sees
// clock edges: the control only when its state changes, a unit only during
// its EXEC cycles.
//
// Interface (master clock domain, core side):
//   request : x_issue_valid / x_issue_ready, payload x_issue_req {op, a, b, rd}
//   response: x_result_valid / x_result_ready, payload x_result {data, rd, flags}
// A transfer happens on the rising edge where valid and ready are both high.
// Latency, counted in clock edges from the edge that accepts a request to
// the edge after which x_result_valid is high: 1 for add, subtract and
// multiply, 29 for a divide of ordinary operands, 2 for a divide with a
// special operand. Per operation the control clock sees 3 edges (accept,
// execute, hand-over) plus one per divide step, the selected unit 1 edge
// (the divider 29) and the other units none. The response is held stable until it
// is taken. Rounding is to nearest, ties to even.
module ext_fpu
  import fpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   x_issue_valid,
  output logic   x_issue_ready,
  input  x_req_t x_issue_req,
  output logic   x_result_valid,
  input  logic   x_result_ready,
  output x_rsp_t x_result,
  output logic   gclk_ctrl,
  output logic   gclk_add,
  output logic   gclk_mul,
  output logic   gclk_div
);
  fp_op_e      op_q;
  logic [31:0] a_q, b_q;
  logic        clk_en, add_en, mul_en, div_en, div_done;
  fp_unr_t     add_res, mul_res, div_res, sel_res;

  clock_gate cg_ctrl (.clk, .rst_n, .en(clk_en), .gclk(gclk_ctrl));
  clock_gate cg_add  (.clk, .rst_n, .en(add_en), .gclk(gclk_add));
  clock_gate cg_mul  (.clk, .rst_n, .en(mul_en), .gclk(gclk_mul));
  clock_gate cg_div  (.clk, .rst_n, .en(div_en), .gclk(gclk_div));

  fpu_ctrl u_ctrl (
    .gclk(gclk_ctrl), .rst_n,
    .issue_valid(x_issue_valid), .issue_ready(x_issue_ready), .issue_req(x_issue_req),
    .result_valid(x_result_valid), .result_ready(x_result_ready), .result_rd(x_result.rd),
    .op_q, .a_q, .b_q, .clk_en, .add_en, .mul_en, .div_en, .div_done
  );

  fp_addsub u_add (.gclk(gclk_add), .rst_n, .a(a_q), .b(b_q), .sub(op_q == FP_SUB), .res(add_res));
  fp_mul    u_mul (.gclk(gclk_mul), .rst_n, .a(a_q), .b(b_q), .res(mul_res));
  fp_div    u_div (.gclk(gclk_div), .rst_n, .start(div_en), .a(a_q), .b(b_q),
                   .done(div_done), .res(div_res));

  always_comb
    unique case (op_q)
      FP_MUL:  sel_res = mul_res;
      FP_DIV:  sel_res = div_res;
      default: sel_res = add_res;
    endcase

  fp_round u_round (.in(sel_res), .result(x_result.data), .flags(x_result.flags));

  // Handshake rule: a response that is offered but not taken stays offered
  // and does not change.
  a_rsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    x_result_valid && !x_result_ready |=> x_result_valid && $stable(x_result));
endmodule
