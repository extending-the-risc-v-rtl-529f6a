// Constant-time reduction modulo q by Barrett's method (pq.modq).
//
// r = x mod q for any W-bit x. The quotient estimate
// qhat = (x * m) >> K with m = floor(2^K / q) and K = W + 8 is at most one
// below floor(x / q) because x < 2^K; one conditional subtraction of q,
// done as a select that is always evaluated, finishes the reduction. The
// same operations run for every input, so the time does not depend on x.
// Combinational; the PQ-ALU completes pq.modq in one cycle.
//
// Barrett reduction is the published method; the input width W = 32 (all of
// rs1), K and the single correction step are this design's choices.
module mod_q
  import lac_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned MOD = Q
) (
  input  logic [W-1:0]       x_i,
  output logic [COEFF_W-1:0] r_o
);

  localparam int unsigned K  = W + 8;
  localparam int unsigned MW = K + 1;
  localparam logic [MW-1:0] M = MW'(((MW+1)'(1) << K) / (MW+1)'(MOD));

  logic [W+MW-1:0] prod;
  logic [W-1:0]    qhat;
  logic [W:0]      r1, r2;

  always_comb begin
    prod = (W+MW)'(x_i) * (W+MW)'(M);
    qhat = W'(prod >> K);
    r1   = (W+1)'(x_i) - (W+1)'(qhat * W'(MOD));
    r2   = r1 - (W+1)'(MOD);
    r_o  = r2[W] ? COEFF_W'(r1) : COEFF_W'(r2);
  end

endmodule
