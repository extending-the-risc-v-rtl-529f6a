// Ternary multiplier: random products modulo x^N - 1 and x^N + 1 against a
// schoolbook reference, plus the corner polynomials a = x^(N-1) and a = -1,
// with the latency checked: done one cycle after the N compute cycles.
module mul_ter_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int N = 24;

  logic clk = 0, rst_n = 0, start = 0, conv_n = 0;
  tern_t [N-1:0]        a;
  logic  [N-1:0][7:0]   b, c;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_ter #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .conv_n_i(conv_n),
                        .a_i(a), .b_i(b), .c_o(c), .busy_o(busy), .done_o(done));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit neg, int mode);
    int ai[], bi[], ci[];
    int cycles;
    ai = new[N]; bi = new[N];
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: a[i] = tern_t'($urandom_range(0, 3));
        1: a[i] = (i == N - 1) ? TERN_POS : TERN_ZERO;
        default: a[i] = (i == 0) ? TERN_NEG : TERN_ZERO;
      endcase
      b[i] = 8'($urandom_range(0, REF_Q - 1));
      ai[i] = tern_val(a[i]);
      bi[i] = int'(b[i]);
    end
    poly_mul(N, neg, ai, bi, ci);
    @(negedge clk); conv_n = neg; start = 1;
    @(negedge clk); start = 0; conv_n = !neg;   // conv_n is latched at start
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != N + 1) begin
      failures++; $display("latency %0d, expected %0d", cycles, N + 1);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(c[i]) != ci[i]) begin
        failures++;
        if (failures < 10) $display("neg=%0d mode=%0d c[%0d]=%0d exp %0d", neg, mode, i, c[i], ci[i]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      run(1'b1, 0);
      run(1'b0, 0);
    end
    run(1'b1, 1); run(1'b0, 1); run(1'b1, 2); run(1'b0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
