// Instruction interface of the Chien-search unit (pq.mul_chien).
//
// Holds the operand registers alpha_0..3 and lambda_0..3 of MUL CHIEN and
// serves the operation mode in rs2[31:30] of the request:
//   0 load left  : alpha_0 = rs1[8:0], lambda_0 = rs1[17:9],
//                  alpha_1 = rs2[8:0], lambda_1 = rs2[17:9]
//   1 load right : the same fields into alpha_2, lambda_2, alpha_3, lambda_3
//   2 calculate  : run one round with loop = rs2[29]; rd[8:0] = out_j.
//                  The request stalls until the round is done.
//   3 none       : completes at once, rd = 0.
//
// Handshake: a request takes effect on the clock edge where req.en and
// rsp.ready are both high. Loads complete in the cycle they are presented;
// calculate occupies 12 cycles (start cycle plus the 11 cycles of MUL CHIEN)
// and completes in the cycle MUL CHIEN reports done.
//
// The three modes, four 9-bit elements per load and the loop control follow
// the published instruction; the bit layout and mode codes are this
// design's choice.
module mul_chien_io
  import lac_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  pq_req_t req_i,
  output pq_rsp_t rsp_o
);

  typedef enum logic {IDLE, BUSY} state_e;

  state_e                  state_q;
  logic [3:0][GF_M-1:0]    alpha_q, lambda_q;
  logic [GF_M-1:0]         out;
  logic                    start, busy, done;
  chien_mode_e             mode;

  assign mode  = chien_mode_e'(req_i.rs2[31:30]);
  assign start = (state_q == IDLE) && req_i.en && (mode == CHIEN_CALC);

  mul_chien #(.LANES(4)) u_mul_chien (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (start),
    .loop_i   (req_i.rs2[29]),
    .alpha_i  (alpha_q),
    .lambda_i (lambda_q),
    .out_o    (out),
    .busy_o   (busy),
    .done_o   (done)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= IDLE;
      alpha_q  <= '0;
      lambda_q <= '0;
    end else begin
      unique case (state_q)
        IDLE: begin
          if (req_i.en) begin
            unique case (mode)
              CHIEN_LOAD_LEFT: begin
                alpha_q[0]  <= req_i.rs1[8:0];
                lambda_q[0] <= req_i.rs1[17:9];
                alpha_q[1]  <= req_i.rs2[8:0];
                lambda_q[1] <= req_i.rs2[17:9];
              end
              CHIEN_LOAD_RIGHT: begin
                alpha_q[2]  <= req_i.rs1[8:0];
                lambda_q[2] <= req_i.rs1[17:9];
                alpha_q[3]  <= req_i.rs2[8:0];
                lambda_q[3] <= req_i.rs2[17:9];
              end
              CHIEN_CALC: state_q <= BUSY;
              default: ;
            endcase
          end
        end
        BUSY:    if (done) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    rsp_o.ready = 1'b1;
    rsp_o.rd    = '0;
    if (state_q == BUSY) begin
      rsp_o.ready = done;
      rsp_o.rd    = {23'd0, out};
    end else if (req_i.en && (mode == CHIEN_CALC)) begin
      rsp_o.ready = 1'b0;
    end
  end

  a_busy_consistent: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy |-> (state_q == BUSY));

endmodule
