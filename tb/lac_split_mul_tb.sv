// LAC-192/LAC-256 polynomial multiplication on the length-512 multiplier.
//
// A product a * b mod (x^1024 + 1), a ternary and b in Z_251, is computed
// the way software drives the unit for n = 1024: a two-level split into
// length-256 pieces, sixteen length-256 x length-256 products on the
// hardware (operands zero-padded to 512, so no wrap-around occurs), a
// recombination c = ll + (lh + hl) x^256 + hh x^512 per length-512 product,
// and a final recombination that wraps coefficients past x^1023 negatively.
// The result is compared with a direct schoolbook product modulo
// x^1024 + 1, and the cycles spent in PQ instructions are reported.
module lac_split_mul_tb;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int N  = 512;
  localparam int NN = 1024;

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
  int n_hw_mul = 0;

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

  // Hardware product of two length-256 pieces: returns 511 coefficients
  task automatic mul_ter_256(input int a[], input int b[], output int c[]);
    logic [31:0] r, w1, w2;
    int ap[], bp[];
    ap = new[N + 3]; bp = new[N + 3];
    foreach (ap[i]) begin ap[i] = (i < 256) ? a[i] : 0; bp[i] = (i < 256) ? b[i] : 0; end
    for (int g = 0; g < (N + 4) / 5; g++) begin
      for (int k = 0; k < 4; k++) w1[8*k +: 8] = 8'(bp[5*g+k]);
      w2 = {2'(TER_WRITE), 1'b0, 11'(g), 18'd0};
      w2[7:0] = 8'(bp[5*g+4]);
      for (int k = 0; k < 5; k++) w2[8+2*k +: 2] = 2'(ap[5*g+k]);
      exec(SEL_MUL_TER, w1, w2, r);
    end
    exec(SEL_MUL_TER, 0, {2'(TER_START), 1'b1, 29'd0}, r);
    n_hw_mul++;
    c = new[N];
    for (int g = 0; g < N / 4; g++) begin
      exec(SEL_MUL_TER, 0, {2'(TER_READ), 1'b0, 11'(g), 18'd0}, r);
      for (int k = 0; k < 4; k++) c[4*g+k] = int'(r[8*k +: 8]);
    end
  endtask

  function automatic void slice(input int x[], input int from, input int len, output int y[]);
    y = new[len];
    foreach (y[i]) y[i] = x[from + i];
  endfunction

  function automatic int md(int v);
    return ((v % REF_Q) + REF_Q) % REF_Q;
  endfunction

  // Unreduced product of two length-512 polynomials (1023 coefficients)
  task automatic split_mul_low(input int a[], input int b[], output int c[]);
    int al[], ah[], bl[], bh[], ll[], hh[], lh[], hl[];
    slice(a, 0, 256, al); slice(a, 256, 256, ah);
    slice(b, 0, 256, bl); slice(b, 256, 256, bh);
    mul_ter_256(al, bl, ll); mul_ter_256(ah, bh, hh);
    mul_ter_256(al, bh, lh); mul_ter_256(ah, bl, hl);
    c = new[NN];
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i < 512; i++) begin
      c[i]       = md(c[i] + ll[i]);
      c[i + 256] = md(c[i + 256] + lh[i] + hl[i]);
      c[i + 512] = md(c[i + 512] + hh[i]);
    end
  endtask

  // Product modulo x^1024 + 1
  task automatic split_mul_high(input int a[], input int b[], output int c[]);
    int al[], ah[], bl[], bh[], ll[], hh[], lh[], hl[];
    slice(a, 0, 512, al); slice(a, 512, 512, ah);
    slice(b, 0, 512, bl); slice(b, 512, 512, bh);
    split_mul_low(al, bl, ll); split_mul_low(ah, bh, hh);
    split_mul_low(al, bh, lh); split_mul_low(ah, bl, hl);
    c = new[NN];
    for (int i = 0; i < NN; i++) c[i] = md(ll[i] - hh[i]);
    for (int i = 0; i < 512; i++) c[i + 512] = md(c[i + 512] + lh[i] + hl[i]);
    for (int i = 512; i < NN; i++) c[i - 512] = md(c[i - 512] - lh[i] - hl[i]);
  endtask

  initial begin
    int a[], b[], c[], ref_c[];
    foreach (gpr[i]) gpr[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    a = new[NN]; b = new[NN];
    foreach (a[i]) begin a[i] = $urandom_range(0, 2) - 1; b[i] = $urandom_range(0, REF_Q - 1); end
    split_mul_high(a, b, c);
    poly_mul(NN, 1'b1, a, b, ref_c);
    for (int i = 0; i < NN; i++) begin
      checks++;
      if (c[i] != ref_c[i]) begin
        failures++;
        if (failures < 10) $display("c[%0d] = %0d, expected %0d", i, c[i], ref_c[i]);
      end
    end
    checks++;
    if (n_hw_mul != 16) failures++;
    $display("n = 1024 product: %0d hardware multiplications, %0d cycles in PQ instructions", n_hw_mul, pq_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
