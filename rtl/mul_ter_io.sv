// Instruction interface of the ternary multiplier (pq.mul_ter).
//
// Holds the input buffers a (N ternary coefficients) and b (N coefficients
// in Z_q) in front of MUL TER and serves three operation modes, chosen by
// rs2[31:30] of the request:
//   0 write : b[5g+0..3] = rs1 bytes 0..3, b[5g+4] = rs2[7:0],
//             a[5g+0..4] = rs2[9:8], rs2[11:10], .. rs2[17:16],
//             with the group address g = rs2[28:18]; indices >= N are ignored.
//   1 start : multiply with conv_n = rs2[29] (1: mod x^N + 1, 0: mod x^N - 1);
//             the request stalls (ready low) until the product is complete.
//   2 read  : rd = c[4g+3..4g], c[4g] in rd[7:0], g = rs2[28:18].
//   3 none  : completes at once, rd = 0.
// The result registers of MUL TER act as the output buffer.
//
// Handshake: a request takes effect on the clock edge where req.en and
// rsp.ready are both high. Write, read and none complete in the cycle they
// are presented; start occupies N+2 cycles (one start cycle, N+1 cycles of
// MUL TER) and completes in the cycle MUL TER reports done.
//
// Packing five general and five ternary coefficients per write and four
// result coefficients per read follows the published instruction; the exact
// bit layout and the mode codes are this design's choice.
module mul_ter_io
  import lac_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  pq_req_t req_i,
  output pq_rsp_t rsp_o
);

  localparam int unsigned IW = $clog2(N * 5 + 8) + 1;

  typedef enum logic {IDLE, BUSY} state_e;

  state_e                      state_q;
  tern_t  [N-1:0]              a_q;
  logic   [N-1:0][COEFF_W-1:0] b_q;
  logic   [N-1:0][COEFF_W-1:0] c;
  logic                        mul_start, mul_busy, mul_done;
  ter_mode_e                   mode;
  logic   [10:0]               grp;
  logic   [4:0][COEFF_W-1:0]   b_in;
  tern_t  [4:0]                a_in;

  assign mode = ter_mode_e'(req_i.rs2[31:30]);
  assign grp  = req_i.rs2[28:18];
  assign b_in = {req_i.rs2[7:0], req_i.rs1};
  assign a_in = req_i.rs2[17:8];

  assign mul_start = (state_q == IDLE) && req_i.en && (mode == TER_START);

  mul_ter #(.N(N)) u_mul_ter (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (mul_start),
    .conv_n_i (req_i.rs2[29]),
    .a_i      (a_q),
    .b_i      (b_q),
    .c_o      (c),
    .busy_o   (mul_busy),
    .done_o   (mul_done)
  );

  // Input buffers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      a_q <= '0;
      b_q <= '0;
    end else if ((state_q == IDLE) && req_i.en && (mode == TER_WRITE)) begin
      for (int unsigned k = 0; k < 5; k++) begin
        if (IW'(grp) * IW'(5) + IW'(k) < IW'(N)) begin
          a_q[IW'(grp) * IW'(5) + IW'(k)] <= a_in[k];
          b_q[IW'(grp) * IW'(5) + IW'(k)] <= b_in[k];
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
    end else begin
      unique case (state_q)
        IDLE:    if (mul_start) state_q <= BUSY;
        BUSY:    if (mul_done)  state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  // Response
  always_comb begin
    rsp_o.ready = 1'b1;
    rsp_o.rd    = '0;
    if (state_q == BUSY) begin
      rsp_o.ready = mul_done;
    end else if (req_i.en) begin
      unique case (mode)
        TER_START: rsp_o.ready = 1'b0;
        TER_READ: begin
          for (int unsigned k = 0; k < 4; k++) begin
            if (IW'(grp) * IW'(4) + IW'(k) < IW'(N)) begin
              rsp_o.rd[8*k +: 8] = c[IW'(grp) * IW'(4) + IW'(k)];
            end
          end
        end
        default: ;
      endcase
    end
  end

  // mul_busy is implied by state BUSY; kept for the assertion only
  a_busy_consistent: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mul_busy |-> (state_q == BUSY));

endmodule
