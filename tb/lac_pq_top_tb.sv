// End-to-end test of the post-quantum extension at its full size (N = 512).
//
// The testbench plays the core: it keeps a 32-entry register file, issues
// PQ instructions (opcode 0x77) whose rs1/rs2 name that register file, holds
// each instruction while ready is low and writes rd back when it completes.
// It runs, through instructions only:
//   - a 512-coefficient product modulo x^512 + 1 (LAC-128) and modulo
//     x^512 - 1 on random ternary/general polynomials, checked coefficient
//     by coefficient against a schoolbook reference;
//   - a Chien round without and several with the loop feedback;
//   - pq.modq on random words, pq.sha256 against a delayed responder;
//   - a non-PQ instruction, which must be ignored.
// Each mechanism (multiplier stall, both convolutions, Chien stall and loop,
// SHA256 wait, modq, ignored instruction) is counted and must occur.
module lac_pq_top_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int N = 512;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0;
  logic [31:0] instr = 0;
  logic [4:0]  rs1_addr, rs2_addr, rd_addr;
  logic [31:0] rs1_data, rs2_data, rd_data;
  logic pq_instr, ready, rd_we;
  logic sha_en, sha_ready;
  logic [31:0] sha_rs1, sha_rs2, sha_rd;
  logic [31:0] gpr [32];
  int sha_wait = 0;
  int checks = 0, failures = 0;
  int n_ter_stall = 0, n_conv_neg = 0, n_conv_pos = 0, n_chien_stall = 0, n_loop = 0;
  int n_sha_wait = 0, n_modq = 0, n_ignored = 0;

  always #5 clk = ~clk;

  lac_pq_top dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_valid_i(instr_valid), .instr_i(instr),
    .rs1_addr_o(rs1_addr), .rs2_addr_o(rs2_addr), .rs1_data_i(rs1_data), .rs2_data_i(rs2_data),
    .pq_instr_o(pq_instr), .ready_o(ready), .rd_we_o(rd_we), .rd_addr_o(rd_addr), .rd_data_o(rd_data),
    .sha_en_o(sha_en), .sha_rs1_o(sha_rs1), .sha_rs2_o(sha_rs2), .sha_ready_i(sha_ready), .sha_rd_i(sha_rd));

  assign rs1_data = gpr[rs1_addr];
  assign rs2_data = gpr[rs2_addr];

  // SHA256 stand-in: answers rs1 + rs2 after five cycles
  always_ff @(posedge clk) begin
    if (sha_en && !sha_ready) sha_wait <= sha_wait + 1;
    else sha_wait <= 0;
  end
  assign sha_ready = sha_en && (sha_wait == 5);
  assign sha_rd    = sha_rs1 + sha_rs2;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Issue one R-type PQ instruction: x3 = op(x1, x2); returns x3 and the cycles taken
  task automatic exec(pq_sel_e f3, logic [31:0] v1, logic [31:0] v2, output logic [31:0] r, output int cycles);
    @(negedge clk);
    gpr[1] = v1; gpr[2] = v2;
    instr = {7'd0, 5'd2, 5'd1, 3'(f3), 5'd3, PQ_OPCODE};
    instr_valid = 1;
    cycles = 1;
    #1;
    while (!ready) begin @(negedge clk); cycles++; #1; end
    if (!(rd_we && rd_addr == 5'd3 && pq_instr)) begin
      failures++; $display("no write-back");
    end
    gpr[3] = rd_data;
    r = rd_data;
    @(posedge clk);
    #1 instr_valid = 0;
  endtask

  int ai[], bi[], ci[];

  task automatic load_operands();
    logic [31:0] r, w1, w2;
    int cyc;
    ai = new[N + 3]; bi = new[N + 3];
    foreach (ai[i]) begin
      ai[i] = (i < N) ? $urandom_range(0, 2) - 1 : 0;
      bi[i] = (i < N) ? $urandom_range(0, REF_Q - 1) : 0;
    end
    for (int g = 0; g < (N + 4) / 5; g++) begin
      for (int k = 0; k < 4; k++) w1[8*k +: 8] = 8'(bi[5*g+k]);
      w2 = {2'(TER_WRITE), 1'b0, 11'(g), 18'd0};
      w2[7:0] = 8'(bi[5*g+4]);
      for (int k = 0; k < 5; k++) w2[8+2*k +: 2] = 2'(ai[5*g+k]);
      exec(SEL_MUL_TER, w1, w2, r, cyc);
    end
  endtask

  task automatic multiply(bit neg);
    logic [31:0] r;
    int cyc;
    int a_n[], b_n[];
    a_n = new[N]; b_n = new[N];
    for (int i = 0; i < N; i++) begin a_n[i] = ai[i]; b_n[i] = bi[i]; end
    poly_mul(N, neg, a_n, b_n, ci);
    exec(SEL_MUL_TER, 0, {2'(TER_START), neg, 29'd0}, r, cyc);
    expect_eq("mul_ter stall cycles", cyc, N + 2);
    if (cyc > 1) n_ter_stall++;
    if (neg) n_conv_neg++; else n_conv_pos++;
    for (int g = 0; g < N / 4; g++) begin
      exec(SEL_MUL_TER, 0, {2'(TER_READ), 1'b0, 11'(g), 18'd0}, r, cyc);
      for (int k = 0; k < 4; k++) expect_eq($sformatf("c[%0d]", 4*g+k), r[8*k +: 8], ci[4*g+k]);
    end
  endtask

  initial begin
    logic [31:0] r;
    int cyc;
    foreach (gpr[i]) gpr[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Ternary multiplication, both convolutions on the same operands
    load_operands();
    multiply(1'b1);
    multiply(1'b0);

    // Chien rounds
    begin
      logic [3:0][8:0] al, la, term;
      logic [8:0] sum;
      for (int k = 0; k < 4; k++) begin al[k] = 9'($urandom); la[k] = 9'($urandom); term[k] = la[k]; end
      exec(SEL_MUL_CHIEN, {14'd0, la[0], al[0]}, {2'(CHIEN_LOAD_LEFT), 12'd0, la[1], al[1]}, r, cyc);
      exec(SEL_MUL_CHIEN, {14'd0, la[2], al[2]}, {2'(CHIEN_LOAD_RIGHT), 12'd0, la[3], al[3]}, r, cyc);
      for (int rr = 0; rr < 6; rr++) begin
        sum = '0;
        for (int k = 0; k < 4; k++) begin term[k] = gf_mul(al[k], term[k]); sum ^= term[k]; end
        exec(SEL_MUL_CHIEN, 0, {2'(CHIEN_CALC), (rr != 0), 29'd0}, r, cyc);
        expect_eq("out_j", r, sum);
        expect_eq("chien stall cycles", cyc, 12);
        if (cyc > 1) n_chien_stall++;
        if (rr != 0) n_loop++;
      end
    end

    // Barrett reduction
    for (int i = 0; i < 50; i++) begin
      logic [31:0] x;
      x = (i == 0) ? 32'hFFFF_FFFF : $urandom;
      exec(SEL_MODQ, x, 0, r, cyc);
      expect_eq("modq", r, longint'(x) % 251);
      expect_eq("modq cycles", cyc, 1);
      n_modq++;
    end

    // SHA256 port
    exec(SEL_SHA256, 32'd1000, 32'd234, r, cyc);
    expect_eq("sha rd", r, 1234);
    expect_eq("sha cycles", cyc, 6);
    if (cyc > 1) n_sha_wait++;

    // A standard instruction (OP, add) is not for the PQ-ALU
    @(negedge clk);
    instr = {7'd0, 5'd2, 5'd1, 3'd0, 5'd3, 7'h33};
    instr_valid = 1;
    #1;
    expect_eq("non-PQ ignored", {pq_instr, rd_we, sha_en}, 0);
    if (!pq_instr && !rd_we) n_ignored++;
    @(negedge clk);
    instr_valid = 0;

    $display("mechanisms: mul_ter stall %0d, conv neg %0d, conv pos %0d, chien stall %0d, loop %0d, sha wait %0d, modq %0d, ignored %0d",
             n_ter_stall, n_conv_neg, n_conv_pos, n_chien_stall, n_loop, n_sha_wait, n_modq, n_ignored);
    if (n_ter_stall == 0 || n_conv_neg == 0 || n_conv_pos == 0 || n_chien_stall == 0 || n_loop == 0 ||
        n_sha_wait == 0 || n_modq == 0 || n_ignored == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
