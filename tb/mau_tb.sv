// Exhaustive check of the modular arithmetic unit: every c, b in [0, q) and
// every ternary code, against integer arithmetic.
module mau_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  logic [7:0] c, b, r;
  tern_t      a;
  int checks = 0, failures = 0;

  mau dut (.c_i(c), .b_i(b), .a_i(a), .c_o(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ai = 0; ai < 4; ai++) begin
      for (int ci = 0; ci < REF_Q; ci++) begin
        for (int bi = 0; bi < REF_Q; bi++) begin
          int exp;
          a = tern_t'(ai); c = 8'(ci); b = 8'(bi);
          #1;
          exp = (((ci + tern_val(a) * bi) % REF_Q) + REF_Q) % REF_Q;
          checks++;
          if (int'(r) != exp) begin
            failures++;
            if (failures < 10) $display("mismatch a=%0d c=%0d b=%0d got %0d exp %0d", ai, ci, bi, r, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
