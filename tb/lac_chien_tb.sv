// Chien search of LAC's BCH decoders run through pq.mul_chien.
//
// For BCH(511,367,16) (LAC-128/LAC-256, positions alpha^112 .. alpha^368)
// and BCH(511,439,8) (LAC-192, alpha^184 .. alpha^440) an error-locator
// polynomial Lambda(x) = prod (1 + alpha^loc x) is built from randomly
// chosen error locations. Software splits Lambda into t/4 groups of four
// terms; for each group it loads alpha^m and lambda_m * alpha^((first-1) m)
// (m = 1+4j .. 4+4j), runs one round without and the remaining rounds with
// the loop feedback, and adds the group results and lambda_0. Every value
// Lambda(alpha^i) is compared with a direct evaluation, and the zeros must be
// exactly the positions 511 - loc of the inserted errors.
module lac_chien_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0;
  logic [31:0] instr = 0;
  logic [4:0]  rs1_addr, rs2_addr, rd_addr;
  logic [31:0] rs1_data, rs2_data, rd_data;
  logic pq_instr, ready, rd_we;
  logic sha_en;
  logic [31:0] sha_rs1, sha_rs2;
  logic [31:0] gpr [32];
  int checks = 0, failures = 0;
  longint pq_cycles = 0;

  always #5 clk = ~clk;

  lac_pq_top dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_valid_i(instr_valid), .instr_i(instr),
    .rs1_addr_o(rs1_addr), .rs2_addr_o(rs2_addr), .rs1_data_i(rs1_data), .rs2_data_i(rs2_data),
    .pq_instr_o(pq_instr), .ready_o(ready), .rd_we_o(rd_we), .rd_addr_o(rd_addr), .rd_data_o(rd_data),
    .sha_en_o(sha_en), .sha_rs1_o(sha_rs1), .sha_rs2_o(sha_rs2), .sha_ready_i(1'b1), .sha_rd_i(32'd0));

  assign rs1_data = gpr[rs1_addr];
  assign rs2_data = gpr[rs2_addr];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(pq_sel_e f3, logic [31:0] v1, logic [31:0] v2, output logic [31:0] r);
    @(negedge clk);
    gpr[1] = v1; gpr[2] = v2;
    instr = {7'd0, 5'd2, 5'd1, 3'(f3), 5'd3, PQ_OPCODE};
    instr_valid = 1;
    pq_cycles++;
    #1;
    while (!ready) begin @(negedge clk); pq_cycles++; #1; end
    r = rd_data;
    @(posedge clk);
    #1 instr_valid = 0;
  endtask

  function automatic logic [8:0] gf_pow(int e);
    logic [8:0] p;
    p = 9'd1;
    e = e % 511;
    for (int i = 0; i < e; i++) p = gf_mul(p, 9'd2);
    return p;
  endfunction

  task automatic search(int t, int first, int last, int nerr);
    logic [8:0] lam [];
    logic [8:0] val [];
    int loc [];
    logic [31:0] r;
    longint c0;
    c0 = pq_cycles;
    // error positions l in [first, last], locations 511 - l, all distinct
    loc = new[nerr];
    for (int e = 0; e < nerr; e++) begin
      bit dup;
      do begin
        loc[e] = $urandom_range(first, last);
        dup = 0;
        for (int f = 0; f < e; f++) if (loc[f] == loc[e]) dup = 1;
      end while (dup);
    end
    // Lambda(x) = prod (1 + alpha^(511 - l) x)
    lam = new[t + 1];
    foreach (lam[i]) lam[i] = (i == 0) ? 9'd1 : 9'd0;
    for (int e = 0; e < nerr; e++) begin
      logic [8:0] xe;
      xe = gf_pow(511 - loc[e]);
      for (int i = t; i >= 1; i--) lam[i] = lam[i] ^ gf_mul(lam[i-1], xe);
    end
    val = new[last - first + 1];
    foreach (val[i]) val[i] = lam[0];
    for (int j = 0; j < t / 4; j++) begin
      logic [3:0][8:0] al, la;
      for (int k = 0; k < 4; k++) begin
        int m;
        m = 1 + k + 4 * j;
        al[k] = gf_pow(m);
        la[k] = gf_mul(lam[m], gf_pow((first - 1) * m));
      end
      exec(SEL_MUL_CHIEN, {14'd0, la[0], al[0]}, {2'(CHIEN_LOAD_LEFT), 12'd0, la[1], al[1]}, r);
      exec(SEL_MUL_CHIEN, {14'd0, la[2], al[2]}, {2'(CHIEN_LOAD_RIGHT), 12'd0, la[3], al[3]}, r);
      for (int i = first; i <= last; i++) begin
        exec(SEL_MUL_CHIEN, 0, {2'(CHIEN_CALC), (i != first), 29'd0}, r);
        val[i - first] ^= r[8:0];
      end
    end
    for (int i = first; i <= last; i++) begin
      logic [8:0] direct;
      bit is_err;
      direct = lam[0];
      for (int m = 1; m <= t; m++) direct ^= gf_mul(lam[m], gf_pow(i * m));
      is_err = 0;
      for (int e = 0; e < nerr; e++) if (loc[e] == i) is_err = 1;
      checks += 2;
      if (val[i - first] != direct) begin
        failures++;
        if (failures < 10) $display("t=%0d Lambda(alpha^%0d) = %h, expected %h", t, i, val[i - first], direct);
      end
      if ((val[i - first] == 0) != is_err) begin
        failures++;
        if (failures < 10) $display("t=%0d root mismatch at %0d", t, i);
      end
    end
    $display("t=%0d, %0d errors, positions %0d..%0d: %0d cycles in PQ instructions", t, nerr, first, last, pq_cycles - c0);
  endtask

  initial begin
    foreach (gpr[i]) gpr[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    search(16, 112, 368, 16);   // LAC-128 / LAC-256
    search(16, 112, 368, 5);
    search(8, 184, 440, 8);     // LAC-192
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
