// GF(2^9) multiplier: the powers alpha^9 = 1 + alpha^4, alpha^10, alpha^11,
// exhaustive products with a few fixed operands and random products against
// a carry-less reference; latency 10 cycles from start to done.
module mul_gf_tb;
  import lac_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] a, b, c;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_gf dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .a_i(a), .b_i(b),
              .c_o(c), .busy_o(busy), .done_o(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(logic [8:0] x, logic [8:0] y, logic [8:0] exp);
    int cycles;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; b = ~y;   // b is captured at start
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (cycles != 10) begin failures++; $display("latency %0d", cycles); end
    if (c !== exp) begin
      failures++;
      if (failures < 10) $display("%h * %h = %h, expected %h", x, y, c, exp);
    end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // alpha^8 * alpha = alpha^9 = 1 + alpha^4; alpha^9 * alpha = alpha + alpha^5; alpha^2 + alpha^6
    mul(9'h100, 9'h002, 9'h011);
    mul(9'h011, 9'h002, 9'h022);
    mul(9'h022, 9'h002, 9'h044);
    for (int x = 0; x < 512; x++) begin
      mul(9'(x), 9'h1B5, gf_mul(9'(x), 9'h1B5));
      mul(9'h0A3, 9'(x), gf_mul(9'h0A3, 9'(x)));
    end
    for (int i = 0; i < 500; i++) begin
      logic [8:0] x, y;
      x = 9'($urandom); y = 9'($urandom);
      mul(x, y, gf_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
