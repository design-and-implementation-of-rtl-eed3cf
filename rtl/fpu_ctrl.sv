// fpu_ctrl: control unit of the floating-point coprocessor.
//
// A three-state machine that owns the coprocessor side of the request /
// response handshake:
//   IDLE  issue_ready = 1. A request (issue_valid) is accepted on the edge;
//         its operation, operands and destination tag are latched.
//   EXEC  the selected arithmetic unit's clock enable is raised. Add, subtract
//         and multiply finish in this one cycle (the unit registers its
//         result on the same edge); divide stays here until the divider
//         reports done.
//   DONE  result_valid = 1 with the destination tag; the state returns to
//         IDLE on the edge where result_ready is also high.
// The machine runs on its own gated clock. clk_en tells the clock gate when
// the next edge is needed: only when a request arrives, during EXEC, or when
// the core takes the response, so the coprocessor control is clock-silent
// while idle and while a response waits. One request is outstanding at a
// time. Asynchronous active-low reset.
module fpu_ctrl
  import fpu_pkg::*;
(
  input  logic        gclk,
  input  logic        rst_n,
  // request channel
  input  logic        issue_valid,
  output logic        issue_ready,
  input  x_req_t      issue_req,
  // response channel (data and flags come from the rounding stage)
  output logic        result_valid,
  input  logic        result_ready,
  output logic [4:0]  result_rd,
  // latched operands for the arithmetic units
  output fp_op_e      op_q,
  output logic [31:0] a_q,
  output logic [31:0] b_q,
  // clock enables
  output logic        clk_en,
  output logic        add_en,
  output logic        mul_en,
  output logic        div_en,
  input  logic        div_done
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_DONE} state_e;

  state_e     state;
  logic [4:0] rd_q;
  logic       unit_done;

  assign issue_ready  = (state == S_IDLE);
  assign result_valid = (state == S_DONE);
  assign result_rd    = rd_q;

  always_comb begin
    add_en    = (state == S_EXEC) && (op_q == FP_ADD || op_q == FP_SUB);
    mul_en    = (state == S_EXEC) && (op_q == FP_MUL);
    div_en    = (state == S_EXEC) && (op_q == FP_DIV);
    unit_done = (op_q == FP_DIV) ? div_done : 1'b1;
    clk_en    = (state == S_IDLE && issue_valid) ||
                (state == S_EXEC) ||
                (state == S_DONE && result_ready);
  end

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= FP_ADD;
      a_q   <= '0;
      b_q   <= '0;
      rd_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (issue_valid) begin
          op_q  <= issue_req.op;
          a_q   <= issue_req.a;
          b_q   <= issue_req.b;
          rd_q  <= issue_req.rd;
          state <= S_EXEC;
        end
        S_EXEC: if (unit_done) state <= S_DONE;
        S_DONE: if (result_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
endmodule
