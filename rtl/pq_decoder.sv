// Decoder extension for the post-quantum instructions.
//
// Recognises the R-type instructions pq.mul_ter, pq.mul_chien, pq.sha256 and
// pq.modq: opcode 0x77 in bits [6:0], the unit chosen by func3 in bits
// [14:12] (0 mul_ter, 1 mul_chien, 2 sha256, 3 modq). It returns the enable
// of the PQ-ALU, the unit select and the register fields rs1 [19:15],
// rs2 [24:20] and rd [11:7]; func7 [31:25] is not used. Combinational.
//
// The opcode and the R-type field positions are those of the extension;
// the func3 code assignment is this design's choice.
module pq_decoder
  import lac_pkg::*;
(
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  output logic        pq_en_o,
  output pq_sel_e     sel_o,
  output logic [4:0]  rs1_o,
  output logic [4:0]  rs2_o,
  output logic [4:0]  rd_o
);

  logic [6:0] opcode;
  logic [2:0] func3;

  assign opcode = instr_i[6:0];
  assign func3  = instr_i[14:12];
  assign rd_o   = instr_i[11:7];
  assign rs1_o  = instr_i[19:15];
  assign rs2_o  = instr_i[24:20];

  always_comb begin
    sel_o   = pq_sel_e'(func3);
    pq_en_o = 1'b0;
    if (instr_valid_i && (opcode == PQ_OPCODE)) begin
      unique case (func3)
        SEL_MUL_TER, SEL_MUL_CHIEN, SEL_SHA256, SEL_MODQ: pq_en_o = 1'b1;
        default: pq_en_o = 1'b0;
      endcase
    end
  end

endmodule
