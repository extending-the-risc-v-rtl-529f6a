// Bit-serial multiplier in GF(2^9) (MUL GF).
//
// Shift-and-add multiplication with interleaved reduction by the primitive
// polynomial p(x) = 1 + x^4 + x^9, operands and result in vector
// representation (bit i is the coefficient of alpha^i). A shift register
// c_0 .. c_8 accumulates: every enabled cycle each c_j takes
// c_{j-1} xor (a_j and b_s), where b_s is the current bit of b, and the
// bit leaving c_8 is added into the inputs of c_0 and c_4. b is scanned from
// b_8 down to b_0 (Horner's rule, most significant bit first).
//
// Timing: start_i (while idle) clears c (rst) and captures b; en is then high
// for 9 cycles (busy_o); done_o pulses in the cycle after, when c_o = a*b.
// a must stay stable while busy_o is high; b may change after the start
// cycle. c_o keeps the product until the next start.
//
// The register structure, the feedback taps and the 9-cycle computation
// follow the published multiplier; capturing b at start (so the Chien unit
// can feed the product back into b) is this design's choice.
module mul_gf
  import lac_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            start_i,
  input  logic [GF_M-1:0] a_i,
  input  logic [GF_M-1:0] b_i,
  output logic [GF_M-1:0] c_o,
  output logic            busy_o,
  output logic            done_o
);

  logic [GF_M-1:0] c_q, b_q;
  logic [3:0]      bit_q;     // index of the b bit used this cycle
  logic            en_q, done_q;
  logic            b_bit;
  logic [GF_M-1:0] c_shift;

  assign b_bit = b_q[bit_q];

  // c * x mod p(x), then + b_bit * a
  always_comb begin
    c_shift = {c_q[GF_M-2:0], 1'b0} ^ (c_q[GF_M-1] ? GF_POLY : '0);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      c_q    <= '0;
      b_q    <= '0;
      bit_q  <= '0;
      en_q   <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!en_q) begin
        if (start_i) begin
          c_q   <= '0;
          b_q   <= b_i;
          bit_q <= 4'(GF_M - 1);
          en_q  <= 1'b1;
        end
      end else begin
        c_q <= c_shift ^ (a_i & {GF_M{b_bit}});
        if (bit_q == '0) begin
          en_q   <= 1'b0;
          done_q <= 1'b1;
        end else begin
          bit_q <= bit_q - 1'b1;
        end
      end
    end
  end

  assign c_o    = c_q;
  assign busy_o = en_q;
  assign done_o = done_q;

endmodule
