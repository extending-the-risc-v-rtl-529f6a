// Barrett reduction: edge values and random 32-bit inputs against the
// integer remainder.
module mod_q_tb;
  import lac_pkg::*;

  logic [31:0] x;
  logic [7:0]  r;
  int checks = 0, failures = 0;

  mod_q dut (.x_i(x), .r_o(r));

  task automatic check(logic [31:0] v);
    longint unsigned exp;
    x = v; #1;
    exp = longint'(v) % 251;
    checks++;
    if (longint'(r) != exp) begin
      failures++;
      if (failures < 10) $display("mismatch x=%0d got %0d exp %0d", v, r, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) check(32'(i));
    for (int k = 1; k < 0.1e6; k++) check(32'(k) * 32'd251 - 32'd1);
    check(32'hFFFF_FFFF); check(32'hFFFF_FFFE); check(32'h8000_0000);
    check(32'd4294967295 - 32'd4294967295 % 32'd251);
    for (int i = 0; i < 200000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
