// Post-quantum ALU (PQ-ALU) of the execute stage.
//
// Sits beside the ALU and multiplier of the core. When en_i is set the
// request (rs1, rs2) goes to the unit chosen by sel_i: the ternary
// multiplier with its buffers (mul_ter_io), the Chien-search unit with its
// operand registers (mul_chien_io), the Barrett reduction mod_q, or the
// external SHA256 accelerator, reached through the sha_* ports. The
// selected unit's result drives rd_o and its ready drives ready_o; the
// other units see no request.
//
// Handshake with the pipeline: en_i, sel_i, rs1_i and rs2_i stay stable while
// ready_o is low; the instruction completes, and rd_o is valid, in the
// cycle where en_i and ready_o are both high. pq.modq always completes in
// its first cycle; pq.mul_ter and pq.mul_chien complete at once except for
// their start/calculate modes, which stall for a fixed number of cycles.
// ready_o is high when en_i is low.
//
// The set of units and the steering by en and sel follow the published
// architecture; the ready handshake is this design's choice.
module pq_alu
  import lac_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  pq_sel_e     sel_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic [31:0] rd_o,
  output logic        ready_o,
  // external SHA256 accelerator
  output logic        sha_en_o,
  output logic [31:0] sha_rs1_o,
  output logic [31:0] sha_rs2_o,
  input  logic        sha_ready_i,
  input  logic [31:0] sha_rd_i
);

  pq_req_t ter_req, chien_req;
  pq_rsp_t ter_rsp, chien_rsp;
  logic [COEFF_W-1:0] modq_r;

  assign ter_req   = '{en: en_i && (sel_i == SEL_MUL_TER),   rs1: rs1_i, rs2: rs2_i};
  assign chien_req = '{en: en_i && (sel_i == SEL_MUL_CHIEN), rs1: rs1_i, rs2: rs2_i};

  mul_ter_io #(.N(N)) u_mul_ter_io (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .req_i  (ter_req),
    .rsp_o  (ter_rsp)
  );

  mul_chien_io u_mul_chien_io (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .req_i  (chien_req),
    .rsp_o  (chien_rsp)
  );

  mod_q #(.W(32), .MOD(Q)) u_mod_q (
    .x_i (rs1_i),
    .r_o (modq_r)
  );

  assign sha_en_o  = en_i && (sel_i == SEL_SHA256);
  assign sha_rs1_o = rs1_i;
  assign sha_rs2_o = rs2_i;

  always_comb begin
    rd_o    = '0;
    ready_o = 1'b1;
    if (en_i) begin
      unique case (sel_i)
        SEL_MUL_TER:   begin rd_o = ter_rsp.rd;   ready_o = ter_rsp.ready;   end
        SEL_MUL_CHIEN: begin rd_o = chien_rsp.rd; ready_o = chien_rsp.ready; end
        SEL_SHA256:    begin rd_o = sha_rd_i;     ready_o = sha_ready_i;     end
        SEL_MODQ:      begin rd_o = {24'd0, modq_r}; ready_o = 1'b1;         end
        default: ;
      endcase
    end
  end

  // A stalled request must be held unchanged until it completes
  a_hold_request: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (en_i && !ready_o) |=> (en_i && $stable(sel_i) && $stable(rs1_i) && $stable(rs2_i)));

endmodule
