// PQ-ALU at N = 8: each unit is reached through sel, the SHA256 port is
// answered by a small responder with a 3-cycle delay, and requests to one
// unit must not reach the others (a write with sel = mul_chien leaves the
// multiplier's buffers unchanged, sha_en stays low for other units).
module pq_alu_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  logic en = 0;
  pq_sel_e sel = SEL_MODQ;
  logic [31:0] rs1 = 0, rs2 = 0, rd;
  logic ready;
  logic sha_en, sha_ready;
  logic [31:0] sha_rs1, sha_rs2, sha_rd;
  int checks = 0, failures = 0;
  int sha_wait = 0;

  always #5 clk = ~clk;

  pq_alu #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .sel_i(sel), .rs1_i(rs1), .rs2_i(rs2),
                       .rd_o(rd), .ready_o(ready), .sha_en_o(sha_en), .sha_rs1_o(sha_rs1),
                       .sha_rs2_o(sha_rs2), .sha_ready_i(sha_ready), .sha_rd_i(sha_rd));

  // SHA256 stand-in: answers rs1 ^ rs2 after three cycles
  always_ff @(posedge clk) begin
    if (sha_en && !sha_ready) sha_wait <= sha_wait + 1;
    else sha_wait <= 0;
  end
  assign sha_ready = sha_en && (sha_wait == 3);
  assign sha_rd    = sha_rs1 ^ sha_rs2;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(pq_sel_e s, logic [31:0] a, logic [31:0] b, output logic [31:0] r, output int cycles);
    @(negedge clk);
    en = 1; sel = s; rs1 = a; rs2 = b;
    cycles = 1;
    #1;
    while (!ready) begin @(negedge clk); cycles++; #1; end
    r = rd;
    @(posedge clk);
    #1 en = 0;
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // sha_en must only follow a SHA256 request
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (sha_en != (en && sel == SEL_SHA256)) failures++;
  end

  initial begin
    logic [31:0] r;
    int cyc;
    int ai[], bi[], ci[];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // multiplier: a = 1 + x (coefficients 0..1 = +1), b = 1..8
    ai = new[N]; bi = new[N];
    foreach (ai[i]) begin ai[i] = (i < 2) ? 1 : 0; bi[i] = i + 1; end
    request(SEL_MUL_TER, {8'd4, 8'd3, 8'd2, 8'd1}, {2'(TER_WRITE), 1'b0, 11'd0, 10'b00_0000_0101, 8'd5}, r, cyc);
    request(SEL_MUL_TER, {8'd9, 8'd8, 8'd7, 8'd6}, {2'(TER_WRITE), 1'b0, 11'd1, 10'd0, 8'd10}, r, cyc);
    // the same write sent to the Chien unit must not reach the multiplier
    request(SEL_MUL_CHIEN, 32'hFFFF_FFFF, {2'(TER_WRITE), 1'b0, 11'd0, 10'b11_1111_1111, 8'd200}, r, cyc);
    poly_mul(N, 1'b1, ai, bi, ci);
    request(SEL_MUL_TER, 0, {2'(TER_START), 1'b1, 29'd0}, r, cyc);
    expect_eq("mul_ter stall", cyc, N + 2);
    for (int g = 0; g < N / 4; g++) begin
      request(SEL_MUL_TER, 0, {2'(TER_READ), 1'b0, 11'(g), 18'd0}, r, cyc);
      for (int k = 0; k < 4; k++) expect_eq("c", r[8*k +: 8], ci[4*g+k]);
    end
    // Chien: alpha = 2 (alpha^1), lambda = 1 in lane 0, zero elsewhere -> alpha, alpha^2, ...
    request(SEL_MUL_CHIEN, {14'd0, 9'd1, 9'd2}, {2'(CHIEN_LOAD_LEFT), 30'd0}, r, cyc);
    request(SEL_MUL_CHIEN, 0, {2'(CHIEN_LOAD_RIGHT), 30'd0}, r, cyc);
    request(SEL_MUL_CHIEN, 0, {2'(CHIEN_CALC), 1'b0, 29'd0}, r, cyc);
    expect_eq("chien stall", cyc, 12);
    expect_eq("alpha^1", r, 2);
    for (int p = 2; p < 12; p++) begin
      request(SEL_MUL_CHIEN, 0, {2'(CHIEN_CALC), 1'b1, 29'd0}, r, cyc);
      expect_eq("alpha^p", r, (p < 9) ? (1 << p) : (p == 9 ? 'h011 : (p == 10 ? 'h022 : 'h044)));
    end
    // modq
    for (int i = 0; i < 100; i++) begin
      logic [31:0] x;
      x = $urandom;
      request(SEL_MODQ, x, 0, r, cyc);
      expect_eq("modq", r, longint'(x) % 251);
      expect_eq("modq cycles", cyc, 1);
    end
    // SHA256 port
    request(SEL_SHA256, 32'h1234_5678, 32'h0F0F_0F0F, r, cyc);
    expect_eq("sha rd", r, 32'h1234_5678 ^ 32'h0F0F_0F0F);
    expect_eq("sha stall", cyc, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
