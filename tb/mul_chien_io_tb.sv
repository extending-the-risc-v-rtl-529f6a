// Instruction interface of the Chien unit: loads the left and right
// operand pairs, runs a round with loop = 0 and rounds with loop = 1, and
// compares out_j in rd with a reference; loads complete in one cycle,
// calculate stalls for 12 cycles.
module mul_chien_io_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  pq_req_t req;
  pq_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_chien_io dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] rd;
    int cyc;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      logic [3:0][8:0] al, la, term;
      logic [8:0] sum;
      for (int k = 0; k < 4; k++) begin al[k] = 9'($urandom); la[k] = 9'($urandom); term[k] = la[k]; end
      request({14'd0, la[0], al[0]}, {2'(CHIEN_LOAD_LEFT), 12'd0, la[1], al[1]}, rd, cyc);
      expect_eq("load cycles", cyc, 1);
      request({14'd0, la[2], al[2]}, {2'(CHIEN_LOAD_RIGHT), 12'd0, la[3], al[3]}, rd, cyc);
      expect_eq("load cycles", cyc, 1);
      for (int r = 0; r < 5; r++) begin
        sum = '0;
        for (int k = 0; k < 4; k++) begin term[k] = gf_mul(al[k], term[k]); sum ^= term[k]; end
        request(32'd0, {2'(CHIEN_CALC), (r != 0), 29'd0}, rd, cyc);
        expect_eq("calc cycles", cyc, 12);
        expect_eq("out_j", int'(rd), int'(sum));
      end
    end
    request(32'd0, {2'(CHIEN_NOP), 30'd0}, rd, cyc);
    expect_eq("nop cycles", cyc, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
