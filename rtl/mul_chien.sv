// Chien-search unit (MUL CHIEN).
//
// Evaluates four terms of the error-locator polynomial at once. Lane k
// (k = 0..3, term 1+k+4j of Lambda) is a GF(2^9) multiplier whose first
// input is the constant alpha_k = alpha^(1+k+4j) and whose second input is
// lambda_k in a round started with loop = 0, or the lane's own previous
// product in a round started with loop = 1. Each round therefore advances
// every term lambda_m * alpha^(i*m) to lambda_m * alpha^((i+1)*m) without
// reloading operands. The four products are captured in output registers
// and added (xor) into out_o = out_j of the split evaluation; lambda_0 and
// the sum over j are left to software.
//
// Timing: start_i (while idle) starts all four multipliers; done_o pulses
// 11 cycles later (10 cycles of the multipliers, 1 cycle to capture the
// products), when out_o is valid. alpha_i must stay stable while busy_o is
// high; lambda_i is taken in the start cycle. out_o holds until the next
// round completes.
//
// Four parallel multipliers, the lambda/feedback multiplexers, the output
// registers and the final addition follow the published unit; taking the
// feedback from the multiplier result register is this design's reading.
module mul_chien
  import lac_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic                       clk_i,
  input  logic                       rst_ni,
  input  logic                       start_i,
  input  logic                       loop_i,
  input  logic [LANES-1:0][GF_M-1:0] alpha_i,
  input  logic [LANES-1:0][GF_M-1:0] lambda_i,
  output logic [GF_M-1:0]            out_o,
  output logic                       busy_o,
  output logic                       done_o
);

  logic [LANES-1:0][GF_M-1:0] prod, operand, out_q;
  logic [LANES-1:0]           gf_busy, gf_done;
  logic                       done_q;
  logic                       start;

  assign start = start_i && !busy_o;

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    assign operand[k] = loop_i ? prod[k] : lambda_i[k];
    mul_gf u_mul_gf (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .start_i (start),
      .a_i     (alpha_i[k]),
      .b_i     (operand[k]),
      .c_o     (prod[k]),
      .busy_o  (gf_busy[k]),
      .done_o  (gf_done[k])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= &gf_done;
      if (&gf_done) out_q <= prod;
    end
  end

  always_comb begin
    out_o = '0;
    for (int k = 0; k < LANES; k++) out_o ^= out_q[k];
  end

  assign busy_o = (|gf_busy) || (|gf_done);
  assign done_o = done_q;

endmodule
