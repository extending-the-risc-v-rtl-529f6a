// Instruction interface of the ternary multiplier at N = 13 (neither a
// multiple of 5 nor of 4, so the last write and read groups are partial):
// coefficients are written five at a time, both convolutions are run and
// the product is read back four coefficients at a time and compared with a
// schoolbook reference. The start request must stall for exactly N+2 cycles,
// out-of-range writes must change nothing and the no-operation mode must
// complete at once.
module mul_ter_io_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int N = 13;

  logic clk = 0, rst_n = 0;
  pq_req_t req;
  pq_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_ter_io #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(logic [31:0] rs1, logic [31:0] rs2, output logic [31:0] rd, output int cycles);
    @(negedge clk);
    req = '{en: 1'b1, rs1: rs1, rs2: rs2};
    cycles = 1;
    #1;
    while (!rsp.ready) begin @(negedge clk); cycles++; #1; end
    rd = rsp.rd;
    @(posedge clk);
    #1 req.en = 1'b0;
  endtask

  function automatic logic [31:0] ctl(ter_mode_e m, bit conv, int grp);
    return {2'(m), conv, 11'(grp), 18'd0};
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int ai[], bi[], ci[];

  task automatic load_random();
    logic [31:0] rd;
    int cyc;
    ai = new[(N + 4) / 5 * 5]; bi = new[(N + 4) / 5 * 5];
    foreach (ai[i]) begin
      ai[i] = $urandom_range(0, 2) - 1;
      bi[i] = $urandom_range(0, REF_Q - 1);
    end
    for (int g = 0; g < (N + 4) / 5; g++) begin
      logic [31:0] rs1, rs2;
      rs2 = ctl(TER_WRITE, 0, g);
      for (int k = 0; k < 4; k++) rs1[8*k +: 8] = 8'(bi[5*g+k]);
      rs2[7:0] = 8'(bi[5*g+4]);
      for (int k = 0; k < 5; k++) rs2[8+2*k +: 2] = 2'(ai[5*g+k]);
      request(rs1, rs2, rd, cyc);
      expect_eq("write cycles", cyc, 1);
    end
    // a write to a group beyond N must be ignored
    request(32'hFFFF_FFFF, ctl(TER_WRITE, 0, (N + 4) / 5 + 3) | 32'h3FFFF, rd, cyc);
  endtask

  task automatic multiply_and_check(bit neg);
    logic [31:0] rd;
    int cyc;
    int a_n[], b_n[];
    a_n = new[N]; b_n = new[N];
    for (int i = 0; i < N; i++) begin a_n[i] = ai[i]; b_n[i] = bi[i]; end
    poly_mul(N, neg, a_n, b_n, ci);
    request(32'd0, ctl(TER_START, neg, 0), rd, cyc);
    expect_eq("start cycles", cyc, N + 2);
    for (int g = 0; g < (N + 3) / 4; g++) begin
      request(32'd0, ctl(TER_READ, 0, g), rd, cyc);
      expect_eq("read cycles", cyc, 1);
      for (int k = 0; k < 4; k++) begin
        if (4*g + k < N) expect_eq($sformatf("c[%0d]", 4*g+k), int'(rd[8*k +: 8]), ci[4*g+k]);
        else expect_eq("pad", int'(rd[8*k +: 8]), 0);
      end
    end
  endtask

  initial begin
    logic [31:0] rd;
    int cyc;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      load_random();
      multiply_and_check(1'b1);
      multiply_and_check(1'b0);
    end
    request(32'd0, ctl(TER_NOP, 0, 0), rd, cyc);
    expect_eq("nop cycles", cyc, 1);
    expect_eq("nop rd", int'(rd), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
