// Decoder: every opcode/func3 combination with random other fields.
module pq_decoder_tb;
  import lac_pkg::*;

  logic        valid;
  logic [31:0] instr;
  logic        en;
  pq_sel_e     sel;
  logic [4:0]  rs1, rs2, rd;
  int checks = 0, failures = 0;

  pq_decoder dut (.instr_valid_i(valid), .instr_i(instr), .pq_en_o(en), .sel_o(sel),
                  .rs1_o(rs1), .rs2_o(rs2), .rd_o(rd));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d (instr %h)", what, got, exp, instr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 128; op++) begin
      for (int f3 = 0; f3 < 8; f3++) begin
        for (int v = 0; v < 2; v++) begin
          logic [4:0] r1, r2, d;
          r1 = 5'($urandom); r2 = 5'($urandom); d = 5'($urandom);
          instr = {7'($urandom), r2, r1, 3'(f3), d, 7'(op)};
          valid = v[0];
          #1;
          expect_eq("en", int'(en), (v == 1 && op == 'h77 && f3 < 4) ? 1 : 0);
          if (en) expect_eq("sel", int'(sel), f3);
          expect_eq("rs1", int'(rs1), int'(r1));
          expect_eq("rs2", int'(rs2), int'(r2));
          expect_eq("rd", int'(rd), int'(d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
