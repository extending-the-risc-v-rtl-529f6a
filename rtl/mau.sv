// Modular arithmetic unit of the ternary multiplier.
//
// Adds b to c, subtracts b from c, or passes c, modulo q, as chosen by the
// ternary coefficient a (+1, -1, 0). Both data inputs must already lie in
// [0, q); the result is brought back into that range by one conditional
// correction by q. Purely combinational.
// The three modes follow the multiplier's description; the correction
// scheme is this design's choice.
module mau
  import lac_pkg::*;
#(
  parameter int unsigned MOD = Q
) (
  input  logic [COEFF_W-1:0] c_i,
  input  logic [COEFF_W-1:0] b_i,
  input  tern_t              a_i,
  output logic [COEFF_W-1:0] c_o
);

  logic [COEFF_W:0] sum, diff;

  always_comb begin
    sum  = {1'b0, c_i} + {1'b0, b_i};
    diff = {1'b0, c_i} - {1'b0, b_i};
    unique case (a_i)
      TERN_POS: c_o = (sum >= (COEFF_W+1)'(MOD)) ? COEFF_W'(sum - (COEFF_W+1)'(MOD)) : sum[COEFF_W-1:0];
      TERN_NEG: c_o = diff[COEFF_W] ? COEFF_W'(diff + (COEFF_W+1)'(MOD)) : diff[COEFF_W-1:0];
      default:  c_o = c_i;
    endcase
  end

endmodule
