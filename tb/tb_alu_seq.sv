// tb_alu_seq: self-checking test of the ALU sequencer with the ALU, RAM8,
// RAM128 and ER at full size (768-bit registers).
// Checks every simple command against wide integer arithmetic and the
// modular multiply R8 := A*B mod C for random 768-bit operands, for short
// multipliers, and for a modulus whose top word is 1, which makes the
// top-word estimate ambiguous and forces full compares, and the reduction
// A mod C done as A*1 mod C with A above C. The modular
// multiply must take 32*93 cycles plus the done cycle, plus 8 per full compare.
module tb_alu_seq;
  import pld_pkg::*;

  localparam int RW = 8;
  localparam int NB = 96 * RW;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, busy, done, ev_fullcmp;
  seq_cmd_e cmd;
  logic [3:0] ra, rb, rc;
  logic [5:0] len;
  logic [7:0] digit8, state_code;
  carry_t carry_out;
  logic [2:0] r8_addr; word_t r8_rdata, r8_wdata; logic r8_we;
  logic [6:0] r128_addr; word_t r128_rdata, r128_wdata; logic r128_we;
  word_t alu_la, alu_lb, alu_sum; logic [7:0] alu_ld; logic alu_neg, alu_first, alu_en;
  carry_t alu_cinit, alu_cout, cq;
  logic er_load, er_shl6; logic [1:0] er_field; logic [23:0] er; logic [7:0] er_digit;
  sub_t ir0, ir1;
  // testbench write port into RAM128
  logic tb_we; logic [6:0] tb_addr; word_t tb_wdata;
  int checks = 0, failures = 0, fullcmps = 0;

  alu_seq #(.REG_WORDS_P(RW)) dut (.*, .er_top6(er[23:18]));
  pld_alu u_alu (.clk, .rst_n, .idea_mode(1'b0), .i_mul(1'b0), .ia0('0), .ib0('0), .ia1('0), .ib1('0),
                 .iadd('0), .iadd_en(1'b0), .ir0, .ir1, .la(alu_la), .lb(alu_lb), .ld(alu_ld),
                 .lneg(alu_neg), .l_first(alu_first), .l_cinit(alu_cinit), .l_en(alu_en),
                 .lsum(alu_sum), .lcout(alu_cout), .lcarry_q(cq));
  pld_ram #(.DEPTH(RW), .W(96)) u_ram8 (.clk, .we(r8_we), .waddr(r8_addr), .wdata(r8_wdata),
                                        .raddr(r8_addr), .rdata(r8_rdata));
  pld_ram #(.DEPTH(16*RW), .W(96)) u_ram128 (.clk, .we(r128_we || tb_we),
            .waddr(tb_we ? tb_addr : r128_addr), .wdata(tb_we ? tb_wdata : r128_wdata),
            .raddr(r128_addr), .rdata(r128_rdata));
  er_reg u_er (.clk, .rst_n, .load(er_load), .field(er_field), .word(r128_rdata), .shl6(er_shl6),
               .wr_lo(1'b0), .lo_data('0), .digit_sel(2'd3), .sel8(1'b0), .er, .digit(er_digit));

  always #5 clk = ~clk;
  always @(posedge clk) if (ev_fullcmp) fullcmps++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rnd();
    logic [NB-1:0] v;
    for (int i = 0; i < NB / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic put_reg(input int r, input logic [NB-1:0] v);
    for (int w = 0; w < RW; w++) begin
      @(negedge clk); tb_we = 1; tb_addr = 7'(r * RW + w); tb_wdata = v[96*w +: 96];
    end
    @(negedge clk); tb_we = 0;
  endtask

  function automatic logic [NB-1:0] get_r8();
    logic [NB-1:0] v;
    for (int w = 0; w < RW; w++) v[96*w +: 96] = u_ram8.mem[w];
    return v;
  endfunction
  function automatic logic [NB-1:0] get_reg(input int r);
    logic [NB-1:0] v;
    for (int w = 0; w < RW; w++) v[96*w +: 96] = u_ram128.mem[r * RW + w];
    return v;
  endfunction

  task automatic issue(input seq_cmd_e c, input int a, input int b, input int m, input int l,
                       output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd = c; ra = 4'(a); rb = 4'(b); rc = 4'(m); len = 6'(l);
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!done) begin cycles++; @(negedge clk); end
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic modmul_test(input logic [NB-1:0] a, b, c, input int l, input string tag);
    logic [2*NB-1:0] e;
    int cyc, fc0;
    put_reg(1, a); put_reg(2, b); put_reg(3, c);
    fc0 = fullcmps;
    issue(SEQ_MODMUL, 1, 2, 3, l, cyc);
    e = ({{NB{1'b0}}, a} * {{NB{1'b0}}, b}) % {{NB{1'b0}}, c};
    chk(get_r8() == e[NB-1:0], $sformatf("%s modmul result", tag));
    chk(cyc == l * (1 + 4 * (2 * RW + 7)) + 1 + 8 * (fullcmps - fc0),
        $sformatf("%s modmul cycles %0d (full compares %0d)", tag, cyc, fullcmps - fc0));
  endtask

  initial begin
    logic [NB-1:0] x, y, c, a, b, e;
    logic [NB+8:0] wide;
    int cyc;
    cmd_valid = 0; cmd = SEQ_LOAD8; ra = 0; rb = 0; rc = 0; len = 0; digit8 = 0;
    tb_we = 0; tb_addr = 0; tb_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // simple commands
    for (int t = 0; t < 5; t++) begin
      x = rnd(); y = rnd();
      put_reg(4, x); put_reg(5, y);
      issue(SEQ_LOAD8, 4, 0, 0, 0, cyc);
      chk(get_r8() == x && cyc == RW + 1, $sformatf("LOAD8 cycles %0d", cyc));
      issue(SEQ_ADD, 5, 0, 0, 0, cyc);
      wide = {9'b0, x} + {9'b0, y};
      chk(get_r8() == wide[NB-1:0] && carry_out == carry_t'(wide[NB]), "ADD");
      issue(SEQ_SUB, 5, 0, 0, 0, cyc);
      chk(get_r8() == x && carry_out == -carry_t'(wide[NB]), "SUB");
      issue(SEQ_NEG, 5, 0, 0, 0, cyc);
      chk(get_r8() == NB'(-y), "NEG");
      digit8 = 8'($urandom);
      issue(SEQ_MULD, 4, 0, 0, 0, cyc);
      wide = {9'b0, NB'(-y)} + {9'b0, x} * digit8;
      chk(get_r8() == wide[NB-1:0] && carry_out == carry_t'(wide[NB+8:NB]), "MULD");
      issue(SEQ_STORE8, 6, 0, 0, 0, cyc);
      chk(get_reg(6) == wide[NB-1:0], "STORE8");
    end

    // modular multiply, random 768-bit operands
    for (int t = 0; t < 4; t++) begin
      c = rnd(); c[NB-1] = (t != 3);
      a = rnd() % c; b = rnd() % c;
      modmul_test(a, b, c, 4 * RW, $sformatf("rand%0d", t));
    end
    // short multiplier: A below 2^96, 4 fields
    c = rnd(); a = rnd(); a[NB-1:96] = '0; a = a % c; b = rnd() % c;
    modmul_test(a, b, c, 4, "short");
    // top word 1: ambiguous estimates, full compares
    for (int t = 0; t < 2; t++) begin
      c = rnd(); c[NB-1:NB-96] = 96'd1;
      a = rnd() % c; b = rnd() % c;
      modmul_test(a, b, c, 4 * RW, $sformatf("ambig%0d", t));
    end
    chk(fullcmps > 0, $sformatf("full compares seen: %0d", fullcmps));
    // extreme: A = B = C-1
    c = rnd(); c[NB-1] = 1;
    modmul_test(c - 1, c - 1, c, 4 * RW, "max");
    // reduction A mod C: with B = 1 only B < C is required, A may be larger
    for (int t = 0; t < 3; t++) begin
      c = rnd();
      if (t == 1) c[NB-1:NB-96] = 96'd5;
      if (t == 2) c = c >> 200;
      a = rnd(); a[NB-1] = 1'b1;
      modmul_test(a, NB'(1), c, 4 * RW, $sformatf("reduce%0d", t));
    end
    $display("full compares: %0d", fullcmps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
