// tb_rsa768: RSA workload on the PLD001 top level at its default size.
// One 768-bit modular exponentiation C = M^E mod N with a random 768-bit
// exponent, run the way the chip's command level would run it:
//   1. the message is reduced first, M := M mod N, as a MODMUL by 1 (the
//      raw message is chosen larger than N);
//   2. left-to-right binary method: for each exponent bit below the top one
//      a squaring, and for each 1 bit a multiplication by M, each a MODMUL
//      into R8 followed by a STORE8 back to the accumulator register.
// The accumulator is read back and checked against wide integer arithmetic
// every 96 exponent bits and at the end, and every MODMUL must take 32*93 cycles plus the done cycle plus 8 per full
// compare. The total cycle count is printed together with the time it
// means at the 25 MHz clock of the original chip, and must stay below the
// half second quoted for a 768-bit key exchange.
module tb_rsa768;
  import pld_pkg::*;

  localparam int RW = REG_WORDS;
  localparam int NB = 96 * RW;
  localparam int MODMUL_CYC = 32 * (1 + 4 * (2 * RW + 7)) + 1;

  logic clk = 0, rst_n = 0;
  logic mode_idea, wait_mode, test_mode;
  logic cmd_valid, cmd_busy, cmd_done, ev_fullcmp;
  seq_cmd_e cmd;
  logic [3:0] cmd_ra, cmd_rb, cmd_rc;
  logic [5:0] cmd_len;
  carry_t cmd_carry;
  logic ix_valid; ix_op_e ix_op; logic [1:0] ix_sel, ix_rd_sel; logic [7:0] ix_imm; logic [3:0] ix_zero;
  logic er_ld_valid; logic [3:0] er_ld_reg; logic [23:0] er_out;
  logic host_we, host_sel8; logic [6:0] host_addr; word_t host_wdata, host_rdata;
  logic ks_start, ks_busy, ks_done; logic [127:0] ks_key; logic [6:0] ks_base;
  logic [6:0] key_base;
  logic io_wr, io_in_ready, io_rd, idio_rdy, idea_busy; sub_t io_wdata, io_rdata;
  logic st_clr, st_upd; logic [31:0] st_sig;

  int checks = 0, failures = 0, fullcmps = 0, n_mul = 0, n_sq = 0;
  longint total = 0;

  pld001 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ev_fullcmp) fullcmps++;

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [NB-1:0] rnd();
    logic [NB-1:0] v;
    for (int i = 0; i < NB / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [NB-1:0] mulmod(input logic [NB-1:0] a, b, n);
    logic [2*NB-1:0] p;
    p = ({{NB{1'b0}}, a} * {{NB{1'b0}}, b}) % {{NB{1'b0}}, n};
    return p[NB-1:0];
  endfunction

  task automatic host_write(input int addr, input word_t v);
    @(negedge clk); host_we = 1; host_sel8 = 0; host_addr = 7'(addr); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask
  task automatic put_reg(input int r, input logic [NB-1:0] v);
    for (int w = 0; w < RW; w++) host_write(r * RW + w, v[96*w +: 96]);
  endtask
  task automatic get_reg(input int r, output logic [NB-1:0] v);
    for (int w = 0; w < RW; w++) begin
      @(negedge clk); host_addr = 7'(r * RW + w);
      #1 v[96*w +: 96] = host_rdata;
    end
  endtask

  // issue one command, return its length in cycles (issue to done)
  task automatic command(input seq_cmd_e c, input int a, input int b, input int n, input int l,
                         output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_ra = 4'(a); cmd_rb = 4'(b); cmd_rc = 4'(n); cmd_len = 6'(l);
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!cmd_done) begin cycles++; @(negedge clk); end
    total += cycles;
  endtask

  // R8 := Ra * Rb mod Rc, then Rd := R8; checks the cycle count
  task automatic mm_store(input int a, input int b, input int n, input int d, input string what);
    int cyc, fc0;
    fc0 = fullcmps;
    command(SEQ_MODMUL, a, b, n, 4 * RW, cyc);
    chk(cyc == MODMUL_CYC + 8 * (fullcmps - fc0), $sformatf("%s: %0d cycles", what, cyc));
    command(SEQ_STORE8, d, 0, 0, 0, cyc);
  endtask

  initial begin
    logic [NB-1:0] n, m_raw, m, e, acc, v, one;
    int top, cyc;

    mode_idea = 0; wait_mode = 1; test_mode = 0;
    cmd_valid = 0; cmd = SEQ_LOAD8; cmd_ra = 0; cmd_rb = 0; cmd_rc = 0; cmd_len = 0;
    ix_valid = 0; ix_op = IX_LDI; ix_sel = 0; ix_rd_sel = 0; ix_imm = 0;
    er_ld_valid = 0; er_ld_reg = 0;
    host_we = 0; host_sel8 = 0; host_addr = 0; host_wdata = 0;
    ks_start = 0; ks_key = 0; ks_base = 0; key_base = 0;
    io_wr = 0; io_wdata = 0; io_rd = 0; st_clr = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // odd 768-bit modulus with top bits 10, raw message with top bits 11
    n = rnd(); n[NB-1 -: 2] = 2'b10; n[0] = 1'b1;
    m_raw = rnd(); m_raw[NB-1 -: 2] = 2'b11;
    e = rnd(); e[NB-1] = 1'b1;
    one = NB'(1);
    chk(m_raw >= n, "raw message above the modulus");

    put_reg(1, m_raw);          // R1: message, reduced in place
    put_reg(2, one);            // R2: constant 1
    put_reg(3, n);              // R3: modulus
    // 1. M := M mod N
    mm_store(1, 2, 3, 1, "reduce M");
    m = m_raw % n;
    get_reg(1, v);
    chk(v == m, "M mod N");
    // 2. LR binary exponentiation, accumulator in R4
    put_reg(4, m);
    acc = m;
    top = NB - 1;
    for (int i = top - 1; i >= 0; i--) begin
      mm_store(4, 4, 3, 4, "square"); n_sq++;
      acc = mulmod(acc, acc, n);
      if (e[i]) begin
        mm_store(4, 1, 3, 4, "multiply"); n_mul++;
        acc = mulmod(acc, m, n);
      end
      if (i % 96 == 0) begin
        get_reg(4, v);
        chk(v == acc, $sformatf("accumulator after exponent bit %0d", i));
      end
    end
    command(SEQ_LOAD8, 4, 0, 0, 0, cyc);
    command(SEQ_STORE8, 15, 0, 0, 0, cyc);
    get_reg(15, v);
    chk(v == acc, "M^E mod N");
    $display("768-bit exponentiation: %0d squarings, %0d multiplications, %0d full compares",
             n_sq, n_mul, fullcmps);
    $display("command cycles %0d = %0d us at 25 MHz", total, total / 25);
    chk(total < 64'd12_500_000, "below half a second at 25 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
