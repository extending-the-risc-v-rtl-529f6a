// Ternary polynomial multiplier (MUL TER).
//
// Computes c = a * b mod (x^N - 1) (conv_n = 0, positive wrapped convolution)
// or c = a * b mod (x^N + 1) (conv_n = 1, negative wrapped convolution), with
// a ternary (coefficients -1, 0, +1) and b, c in Z_q, q = 251.
//
// Datapath: N coefficient registers c_{N-1} .. c_0 and N modular arithmetic
// units form a ring. The unit fed by register c_k also receives b_k and
// writes register c_{k-1}; the unit fed by c_0 writes c_{N-1} (the
// wrap-around feedback). In cycle cntr (0 .. N-1) every unit adds, subtracts
// or forwards according to the same coefficient a_cntr, and unit k uses
// -a_cntr instead when conv_n = 1 and k > N-1-cntr, i.e. exactly for the
// products a_cntr * b_k that wrap past x^N. After N cycles register c_k
// holds coefficient k of the product.
//
// The control unit holds a cycle counter and picks a_cntr out of the a
// input, which must stay stable while busy_o is high; b must stay stable too.
//
// Timing: start_i (while idle) clears c and latches conv_n in one cycle, then
// N compute cycles follow with busy_o high; done_o pulses for one cycle in
// the cycle after the last compute step, when c_o is final. c_o keeps its
// value until the next start.
//
// The ring, the per-unit sign selection and the N-cycle latency follow the
// published architecture; the clear-on-start cycle, the indexing of a
// (instead of shifting it) and the reset are this design's choices.
module mul_ter
  import lac_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          start_i,
  input  logic                          conv_n_i,
  input  tern_t  [N-1:0]                a_i,
  input  logic   [N-1:0][COEFF_W-1:0]   b_i,
  output logic   [N-1:0][COEFF_W-1:0]   c_o,
  output logic                          busy_o,
  output logic                          done_o
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0]              cntr_q;
  logic                       busy_q, done_q, conv_n_q;
  logic [N-1:0][COEFF_W-1:0]  c_q, c_d;
  tern_t                      a_cur;
  tern_t [N-1:0]              a_eff;

  assign a_cur = a_i[cntr_q];

  // Sign selection per unit (sel_k of the control unit)
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      a_eff[k] = (conv_n_q && (k > (N - 1 - 32'(cntr_q)))) ? tern_neg(a_cur) : a_cur;
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_mau
    localparam int unsigned DST = (k == 0) ? N - 1 : k - 1;
    mau u_mau (
      .c_i (c_q[k]),
      .b_i (b_i[k]),
      .a_i (a_eff[k]),
      .c_o (c_d[DST])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cntr_q   <= '0;
      busy_q   <= 1'b0;
      done_q   <= 1'b0;
      conv_n_q <= 1'b0;
      c_q      <= '0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start_i) begin
          c_q      <= '0;
          cntr_q   <= '0;
          conv_n_q <= conv_n_i;
          busy_q   <= 1'b1;
        end
      end else begin
        c_q <= c_d;
        if (32'(cntr_q) == N - 1) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
          cntr_q <= '0;
        end else begin
          cntr_q <= cntr_q + 1'b1;
        end
      end
    end
  end

  assign c_o    = c_q;
  assign busy_o = busy_q;
  assign done_o = done_q;

endmodule
