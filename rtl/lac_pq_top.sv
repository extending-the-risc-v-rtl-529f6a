// Post-quantum extension of a RISC-V execute stage for the LAC scheme.
//
// Custom R-type instructions with opcode 0x77 give software direct access
// to hardware for LAC's costliest steps: pq.mul_ter (ternary x general
// polynomial multiplication modulo x^N +- 1, q = 251), pq.mul_chien (four
// GF(2^9) terms of a Chien search per step), pq.sha256 (an external SHA256
// accelerator reached through the sha_* ports) and pq.modq (Barrett
// reduction modulo 251). This module is what the core's decoder and
// execute stage gain: pq_decoder recognises the instruction and picks the
// unit from func3, pq_alu runs it on the register values.
//
// Interface to the core: the instruction word comes with instr_valid_i; the
// core reads rs1_addr_o/rs2_addr_o from its register file and returns the
// values on rs1_data_i/rs2_data_i. ready_o low stalls the pipeline; the core
// holds the instruction and operands until ready_o is high, and in that cycle
// rd_we_o/rd_addr_o/rd_data_o write the result. For an instruction that is
// not a PQ instruction pq_instr_o is low and nothing happens.
//
// The instruction format, opcode and units follow the published extension;
// the func3 codes, operand layouts and stall handshake are this design's.
module lac_pq_top
  import lac_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  output logic [4:0]  rs1_addr_o,
  output logic [4:0]  rs2_addr_o,
  input  logic [31:0] rs1_data_i,
  input  logic [31:0] rs2_data_i,
  output logic        pq_instr_o,
  output logic        ready_o,
  output logic        rd_we_o,
  output logic [4:0]  rd_addr_o,
  output logic [31:0] rd_data_o,
  // external SHA256 accelerator
  output logic        sha_en_o,
  output logic [31:0] sha_rs1_o,
  output logic [31:0] sha_rs2_o,
  input  logic        sha_ready_i,
  input  logic [31:0] sha_rd_i
);

  logic    pq_en;
  pq_sel_e sel;

  pq_decoder u_pq_decoder (
    .instr_valid_i (instr_valid_i),
    .instr_i       (instr_i),
    .pq_en_o       (pq_en),
    .sel_o         (sel),
    .rs1_o         (rs1_addr_o),
    .rs2_o         (rs2_addr_o),
    .rd_o          (rd_addr_o)
  );

  pq_alu #(.N(N)) u_pq_alu (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .en_i        (pq_en),
    .sel_i       (sel),
    .rs1_i       (rs1_data_i),
    .rs2_i       (rs2_data_i),
    .rd_o        (rd_data_o),
    .ready_o     (ready_o),
    .sha_en_o    (sha_en_o),
    .sha_rs1_o   (sha_rs1_o),
    .sha_rs2_o   (sha_rs2_o),
    .sha_ready_i (sha_ready_i),
    .sha_rd_i    (sha_rd_i)
  );

  assign pq_instr_o = pq_en;
  assign rd_we_o    = pq_en && ready_o;

endmodule
