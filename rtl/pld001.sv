// pld001: top level of the PLD001 cryptoprocessor datapath and controllers.
//
// One shared ALU (four 24-bit units) serves both RSA-style long modular
// arithmetic and the IDEA block cipher. In long mode (mode_idea=0) the ALU
// sequencer runs commands on 768-bit registers held in RAM8 (one register)
// and RAM128 (sixteen registers), using ER as the source of multiplier
// digits; the modular multiply is the building block of RSA exponentiation.
// In block encryption mode (mode_idea=1) the ALU is switched to two 16x16
// multipliers modulo 2^16+1, the IDEA control runs one 64-bit block per 50
// cycles with its key words read from RAM128 starting at key_base, and the
// I/O control double-buffers the blocks. The key schedule unit writes an
// encryption key set into RAM128. The index calculation unit addresses
// 24-bit fields of a register for ER loads and supplies the digit number
// for MULD. A state-hashing self-test watches the controllers.
//
// Host access (Sec. 7.4): host_* reads and writes RAM words directly. With
// wait_mode high every word can be read; otherwise only the last two data
// registers of RAM128 (registers 14 and 15) read back, other reads give 0,
// so that keys cannot leak. ER and the self-test signature are visible only
// in wait_mode and test_mode respectively.
//
// Arbitration (this design's choice): RAM128 is written by the key schedule,
// else the sequencer, else the host; its read port belongs to the IDEA
// control in mode_idea, else to the sequencer while it is busy, else to an
// ER load command (er_ld_valid), else to the host. Host commands should be
// issued only while the unit they use is idle. The microcode level
// (command fetcher, code ROM, high-level command decoder) is not part of this
// RTL: its command inputs are brought out as ports.
module pld001
  import pld_pkg::*;
#(
  parameter int REG_WORDS_P = REG_WORDS,
  localparam int DEPTH128 = N_REGS * REG_WORDS_P,
  localparam int AW128    = $clog2(DEPTH128),
  localparam int AW8      = (REG_WORDS_P > 1) ? $clog2(REG_WORDS_P) : 1,
  localparam int LEN_W    = $clog2(4 * REG_WORDS_P + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mode_idea,
  input  logic             wait_mode,
  input  logic             test_mode,
  // ALU sequencer commands
  input  logic             cmd_valid,
  input  seq_cmd_e         cmd,
  input  logic [3:0]       cmd_ra, cmd_rb, cmd_rc,
  input  logic [LEN_W-1:0] cmd_len,
  output logic             cmd_busy,
  output logic             cmd_done,
  output carry_t           cmd_carry,
  output logic             ev_fullcmp,
  // index calculation and ER load
  input  logic             ix_valid,
  input  ix_op_e           ix_op,
  input  logic [1:0]       ix_sel,
  input  logic [7:0]       ix_imm,
  input  logic [1:0]       ix_rd_sel,
  output logic [3:0]       ix_zero,
  input  logic             er_ld_valid,   // ER := field of register er_ld_reg at X[ix_rd_sel]
  input  logic [3:0]       er_ld_reg,
  output logic [23:0]      er_out,
  // host memory access
  input  logic             host_we,
  input  logic             host_sel8,
  input  logic [AW128-1:0] host_addr,
  input  word_t            host_wdata,
  output word_t            host_rdata,
  // IDEA key schedule
  input  logic             ks_start,
  input  logic [127:0]     ks_key,
  input  logic [AW128-1:0] ks_base,
  output logic             ks_busy,
  output logic             ks_done,
  // IDEA block I/O
  input  logic [AW128-1:0] key_base,
  input  logic             io_wr,
  input  sub_t             io_wdata,
  output logic             io_in_ready,
  input  logic             io_rd,
  output sub_t             io_rdata,
  output logic             idio_rdy,
  output logic             idea_busy,
  // self-test
  input  logic             st_clr,
  output logic [31:0]      st_sig,
  output logic             st_upd
);
  // ---------------- memories ----------------
  logic             r8_we,  r128_we;
  logic [AW8-1:0]   r8_waddr, r8_raddr;
  logic [AW128-1:0] r128_waddr, r128_raddr;
  word_t            r8_wdata, r8_rdata, r128_wdata, r128_rdata;

  pld_ram #(.DEPTH(REG_WORDS_P), .W(WORD_W)) u_ram8 (
    .clk, .we(r8_we), .waddr(r8_waddr), .wdata(r8_wdata), .raddr(r8_raddr), .rdata(r8_rdata));
  pld_ram #(.DEPTH(DEPTH128), .W(WORD_W)) u_ram128 (
    .clk, .we(r128_we), .waddr(r128_waddr), .wdata(r128_wdata), .raddr(r128_raddr), .rdata(r128_rdata));

  // ---------------- ALU ----------------
  logic       alu_mul, iadd_en;
  sub_t       ia0, ib0, ia1, ib1, iadd, ir0, ir1;
  word_t      alu_la, alu_lb, alu_sum;
  logic [7:0] alu_ld;
  logic       alu_neg, alu_first, alu_en;
  carry_t     alu_cinit, alu_cout, alu_carry_q;

  pld_alu u_alu (
    .clk, .rst_n, .idea_mode(mode_idea),
    .i_mul(alu_mul), .ia0, .ib0, .ia1, .ib1, .iadd, .iadd_en, .ir0, .ir1,
    .la(alu_la), .lb(alu_lb), .ld(alu_ld), .lneg(alu_neg), .l_first(alu_first),
    .l_cinit(alu_cinit), .l_en(alu_en && !mode_idea), .lsum(alu_sum), .lcout(alu_cout),
    .lcarry_q(alu_carry_q));

  // ---------------- ER and index calculation ----------------
  logic        er_load, er_shl6, seq_er_load, ix_er_wr;
  logic [1:0]  er_field, seq_er_field;
  logic [7:0]  ix_er_wdata, er_digit;
  logic [23:0] er_q;
  logic [2:0]  ix_word;
  logic [1:0]  ix_field, ix_digit;
  logic [7:0]  ix_x [4];

  index_calc u_ix (
    .clk, .rst_n, .valid(ix_valid), .op(ix_op), .sel(ix_sel), .imm(ix_imm),
    .er_lo(er_q[7:0]), .er_wr(ix_er_wr), .er_wdata(ix_er_wdata),
    .rd_sel(ix_rd_sel), .word_idx(ix_word), .field_idx(ix_field), .digit_idx(ix_digit),
    .zero(ix_zero), .x_out(ix_x));

  logic seq_busy, seq_r8_we, seq_r128_we;
  logic [AW8-1:0]   seq_r8_addr;
  logic [AW128-1:0] seq_r128_addr;
  word_t            seq_r8_wdata, seq_r128_wdata;
  logic [7:0]       seq_state;

  logic er_cmd;
  assign er_cmd   = er_ld_valid && !seq_busy && !mode_idea;
  assign er_load  = seq_er_load || er_cmd;
  assign er_field = seq_busy ? seq_er_field : ix_field;

  er_reg u_er (
    .clk, .rst_n, .load(er_load), .field(er_field), .word(r128_rdata),
    .shl6(er_shl6), .wr_lo(ix_er_wr), .lo_data(ix_er_wdata),
    .digit_sel(ix_digit), .sel8(1'b1), .er(er_q), .digit(er_digit));

  // ---------------- ALU sequencer ----------------
  word_t  seq_la, seq_lb;
  logic [7:0] seq_ld;
  logic   seq_neg, seq_first, seq_en;
  carry_t seq_cinit;

  alu_seq #(.REG_WORDS_P(REG_WORDS_P)) u_seq (
    .clk, .rst_n, .cmd_valid(cmd_valid && !mode_idea), .cmd, .ra(cmd_ra), .rb(cmd_rb), .rc(cmd_rc),
    .len(cmd_len), .digit8(er_digit), .busy(seq_busy), .done(cmd_done), .carry_out(cmd_carry),
    .ev_fullcmp, .state_code(seq_state),
    .r8_addr(seq_r8_addr), .r8_rdata, .r8_we(seq_r8_we), .r8_wdata(seq_r8_wdata),
    .r128_addr(seq_r128_addr), .r128_rdata, .r128_we(seq_r128_we), .r128_wdata(seq_r128_wdata),
    .alu_la(seq_la), .alu_lb(seq_lb), .alu_ld(seq_ld), .alu_neg(seq_neg), .alu_first(seq_first),
    .alu_cinit(seq_cinit), .alu_en(seq_en), .alu_sum, .alu_cout,
    .er_load(seq_er_load), .er_field(seq_er_field), .er_shl6, .er_top6(er_q[23:18]));

  assign alu_la = seq_la;  assign alu_lb = seq_lb;  assign alu_ld = seq_ld;
  assign alu_neg = seq_neg; assign alu_first = seq_first; assign alu_cinit = seq_cinit;
  assign alu_en = seq_en;
  assign cmd_busy = seq_busy;

  // ---------------- IDEA ----------------
  logic             eng_start, eng_busy, eng_ready, eng_done;
  sub_t             eng_x [4], eng_y [4];
  logic [AW128-1:0] key_addr;
  logic [7:0]       idea_state, io_state;

  idea_ctrl #(.AW(AW128)) u_idea (
    .clk, .rst_n, .start(eng_start), .x_in(eng_x), .key_base, .busy(eng_busy), .ready(eng_ready), .done(eng_done),
    .y_out(eng_y), .state_code(idea_state), .key_addr, .key_word(r128_rdata),
    .alu_mul, .ia0, .ib0, .ia1, .ib1, .iadd, .iadd_en, .ir0, .ir1);

  idea_io u_io (
    .clk, .rst_n, .enable(mode_idea), .wr_en(io_wr), .wr_data(io_wdata), .in_ready(io_in_ready),
    .rd_en(io_rd), .rd_data(io_rdata), .idio_rdy, .state_code(io_state),
    .eng_start, .eng_x, .eng_busy, .eng_ready, .eng_done, .eng_y);

  assign idea_busy = eng_busy;

  logic             ks_we;
  logic [AW128-1:0] ks_waddr;
  word_t            ks_wdata;

  idea_keysched #(.AW(AW128)) u_ks (
    .clk, .rst_n, .start(ks_start), .key(ks_key), .base(ks_base), .busy(ks_busy), .done(ks_done),
    .we(ks_we), .waddr(ks_waddr), .wdata(ks_wdata));

  // ---------------- memory port arbitration ----------------
  always_comb begin
    r128_we    = ks_we || seq_r128_we || (host_we && !host_sel8);
    r128_waddr = ks_we ? ks_waddr : seq_r128_we ? seq_r128_addr : host_addr;
    r128_wdata = ks_we ? ks_wdata : seq_r128_we ? seq_r128_wdata : host_wdata;
    if (mode_idea)     r128_raddr = key_addr;
    else if (seq_busy) r128_raddr = seq_r128_addr;
    else if (er_cmd)   r128_raddr = AW128'(er_ld_reg * REG_WORDS_P + 32'(ix_word));
    else               r128_raddr = host_addr;

    r8_we    = seq_r8_we || (host_we && host_sel8 && !seq_busy);
    r8_waddr = seq_r8_we ? seq_r8_addr : AW8'(host_addr);
    r8_wdata = seq_r8_we ? seq_r8_wdata : host_wdata;
    r8_raddr = seq_busy ? seq_r8_addr : AW8'(host_addr);

    // I/O mode exposes only registers 14 and 15 of RAM128
    if (host_sel8)
      host_rdata = wait_mode ? r8_rdata : '0;
    else if (wait_mode || (32'(host_addr) >= 14 * REG_WORDS_P))
      host_rdata = r128_rdata;
    else
      host_rdata = '0;
  end

  assign er_out = wait_mode ? er_q : '0;

  // ---------------- self-test ----------------
  logic [7:0] st_state [4];
  logic [31:0] sig_q;
  assign st_state[0] = seq_state;
  assign st_state[1] = idea_state;
  assign st_state[2] = io_state;
  assign st_state[3] = {mode_idea, wait_mode, ks_busy, seq_busy, eng_busy, idio_rdy,
                        alu_carry_q[0], ix_zero[0]};

  selftest #(.N_AN(4)) u_st (
    .clk, .rst_n, .clr(st_clr), .step(1'b1), .state(st_state), .sig(sig_q), .sig_upd(st_upd));

  assign st_sig = test_mode ? sig_q : '0;
endmodule
