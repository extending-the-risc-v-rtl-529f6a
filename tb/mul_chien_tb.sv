// Chien unit: a first round with loop = 0 and several rounds with loop = 1,
// compared with the sum of lambda_k * alpha_k^r computed by a reference;
// latency 11 cycles from start to done.
module mul_chien_tb;
  import lac_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, loop = 0;
  logic [3:0][8:0] alpha, lambda;
  logic [8:0] out;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_chien dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .loop_i(loop),
                 .alpha_i(alpha), .lambda_i(lambda), .out_o(out), .busy_o(busy), .done_o(done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic round(bit lp, logic [8:0] exp);
    int cycles;
    @(negedge clk); loop = lp; start = 1;
    @(negedge clk); start = 0; loop = !lp;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (cycles != 11) begin failures++; $display("latency %0d", cycles); end
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("loop=%0d out %h expected %h", lp, out, exp);
    end
  endtask

  initial begin
    alpha = '0; lambda = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [3:0][8:0] term;
      logic [8:0] sum;
      for (int k = 0; k < 4; k++) begin
        alpha[k] = 9'($urandom); lambda[k] = 9'($urandom);
        term[k] = lambda[k];
      end
      for (int r = 0; r < 8; r++) begin
        sum = '0;
        for (int k = 0; k < 4; k++) begin
          term[k] = gf_mul(alpha[k], term[k]);
          sum ^= term[k];
        end
        round(r != 0, sum);
        // lambda changes must not matter while looping
        lambda = ~lambda;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
