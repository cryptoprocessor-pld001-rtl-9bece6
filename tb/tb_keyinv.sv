// tb_keyinv: IDEA key inversion on the PLD001 top level at its default
// size, done with the chip's own integer arithmetic.
// The key schedule writes an encryption key set into RAM128. The 18
// multiplicative decryption subkeys are then computed on the long-number
// side as x^65535 mod 65537 (Fermat's little theorem, 0 standing for 2^16),
// by the left-to-right binary method: fifteen squarings and fifteen
// multiplications, each a MODMUL with a one-field multiplier followed by a
// STORE8. The 18 additive ones come from NEG (the low 16 bits of -x). The
// testbench only moves the 16-bit results into their places in the
// decryption key set, writes it to RAM128, and checks it against the
// reference model; then blocks encrypted on the chip must decrypt back to
// the plaintext with it. One key has zero subkeys, whose inverse is zero.
// The cycles spent on the inversion are printed.
module tb_keyinv;
  import pld_pkg::*;
  import idea_ref_pkg::*;

  localparam int RW = REG_WORDS;
  localparam int NB = 96 * RW;
  // key sets in the space of registers 12..15, clear of the work registers
  localparam int KEY_ENC = 12 * RW;
  localparam int KEY_DEC = 14 * RW;

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

  int checks = 0, failures = 0, n_inv = 0, n_neg = 0, n_zero = 0;
  longint total = 0;

  pld001 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input int addr, input word_t v);
    @(negedge clk); host_we = 1; host_sel8 = 0; host_addr = 7'(addr); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask
  task automatic put_reg(input int r, input logic [NB-1:0] v);
    for (int w = 0; w < RW; w++) host_write(r * RW + w, v[96*w +: 96]);
  endtask
  task automatic read_word(input logic sel8, input int addr, output word_t v);
    @(negedge clk); host_sel8 = sel8; host_addr = 7'(addr);
    #1 v = host_rdata;
    @(negedge clk); host_sel8 = 0;
  endtask

  task automatic command(input seq_cmd_e c, input int a, input int b, input int n, input int l);
    int cycles;
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_ra = 4'(a); cmd_rb = 4'(b); cmd_rc = 4'(n); cmd_len = 6'(l);
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!cmd_done) begin cycles++; @(negedge clk); end
    total += cycles;
  endtask

  // multiplicative inverse mod 2^16+1 on the chip; R3 holds 65537
  task automatic chip_inv(input logic [15:0] x, output logic [15:0] y);
    word_t w;
    put_reg(1, (x == 0) ? NB'(65536) : NB'(x));   // R1 := x
    command(SEQ_LOAD8, 1, 0, 0, 0);
    command(SEQ_STORE8, 4, 0, 0, 0);               // R4 := x
    for (int i = 0; i < 15; i++) begin             // exponent 0xFFFF
      command(SEQ_MODMUL, 4, 4, 3, 1); command(SEQ_STORE8, 4, 0, 0, 0);
      command(SEQ_MODMUL, 4, 1, 3, 1); command(SEQ_STORE8, 4, 0, 0, 0);
    end
    read_word(1'b1, 0, w);                         // R8 word 0
    y = w[15:0];                                   // 2^16 becomes 0
    n_inv++;
    if (x == 0) n_zero++;
  endtask

  // additive inverse mod 2^16 on the chip
  task automatic chip_neg(input logic [15:0] x, output logic [15:0] y);
    word_t w;
    host_write(5 * RW, 96'(x));                    // R5 := x (other words 0)
    command(SEQ_NEG, 5, 0, 0, 0);
    read_word(1'b1, 0, w);
    y = w[15:0];
    n_neg++;
  endtask

  task automatic idea_stream(input logic [63:0] in_blk [], output logic [63:0] out_blk []);
    out_blk = new[in_blk.size()];
    fork
      foreach (in_blk[b]) for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        while (!io_in_ready) @(negedge clk);
        io_wr = 1; io_wdata = in_blk[b][63 - 16*i -: 16];
        @(negedge clk); io_wr = 0;
      end
      foreach (out_blk[b]) begin
        @(negedge clk);
        while (!idio_rdy) @(negedge clk);
        for (int i = 0; i < 4; i++) begin
          out_blk[b][63 - 16*i -: 16] = io_rdata;
          io_rd = 1; @(negedge clk); io_rd = 0;
        end
      end
    join
  endtask

  initial begin
    logic [127:0] key;
    sk_t z, d, dref;
    logic [63:0] pt [], ct [], back [];
    word_t w;

    mode_idea = 0; wait_mode = 1; test_mode = 0;
    cmd_valid = 0; cmd = SEQ_LOAD8; cmd_ra = 0; cmd_rb = 0; cmd_rc = 0; cmd_len = 0;
    ix_valid = 0; ix_op = IX_LDI; ix_sel = 0; ix_rd_sel = 0; ix_imm = 0;
    er_ld_valid = 0; er_ld_reg = 0;
    host_we = 0; host_sel8 = 0; host_addr = 0; host_wdata = 0;
    ks_start = 0; ks_key = 0; ks_base = 0; key_base = 0;
    io_wr = 0; io_wdata = 0; io_rd = 0; st_clr = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    for (int t = 0; t < 2; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) key[127:96] = '0;                // Z1 = Z2 = 0
      @(negedge clk); mode_idea = 0; ks_key = key; ks_base = 7'(KEY_ENC); ks_start = 1;
      @(negedge clk); ks_start = 0;
      while (!ks_done) @(negedge clk);
      @(negedge clk);
      // encryption subkeys as the chip holds them
      for (int n = 0; n < 9; n++) begin
        read_word(1'b0, KEY_ENC + n, w);
        for (int i = 0; i < 6; i++) if (6*n + i < 52) z[6*n + i] = w[16*i +: 16];
      end
      chk(z == ref_keys(key), $sformatf("key %0d: key schedule", t));
      // the same layout as the reference decryption set, values from the chip
      put_reg(3, NB'(65537));
      total = 0;
      for (int r = 0; r < 9; r++) begin
        int s;
        s = 8 - r;
        chip_inv(z[6*s+0], d[6*r+0]);
        chip_inv(z[6*s+3], d[6*r+3]);
        if (r == 0 || r == 8) begin
          chip_neg(z[6*s+1], d[6*r+1]);
          chip_neg(z[6*s+2], d[6*r+2]);
        end else begin
          chip_neg(z[6*s+2], d[6*r+1]);
          chip_neg(z[6*s+1], d[6*r+2]);
        end
        if (r < 8) begin
          d[6*r+4] = z[6*(7-r)+4];
          d[6*r+5] = z[6*(7-r)+5];
        end
      end
      $display("key %0d: 18 inverses and 18 negations in %0d command cycles", t, total);
      dref = ref_dec_keys(z);
      for (int i = 0; i < 52; i++)
        chk(d[i] == dref[i], $sformatf("key %0d: decryption subkey %0d %h exp %h", t, i, d[i], dref[i]));
      for (int n = 0; n < 9; n++) host_write(KEY_DEC + n, idea_ref_pkg::key_word(d, n));
      // encrypt on the chip, decrypt with the chip-made key set
      pt = new[4];
      foreach (pt[i]) pt[i] = {$urandom, $urandom};
      @(negedge clk); mode_idea = 1; key_base = 7'(KEY_ENC);
      idea_stream(pt, ct);
      foreach (ct[i]) chk(ct[i] == ref_crypt(pt[i], z), $sformatf("key %0d: encrypt block %0d", t, i));
      @(negedge clk); key_base = 7'(KEY_DEC);
      idea_stream(ct, back);
      foreach (back[i]) chk(back[i] == pt[i], $sformatf("key %0d: decrypt block %0d", t, i));
    end
    chk(n_inv == 36 && n_neg == 36 && n_zero > 0, $sformatf("%0d inverses (%0d of zero), %0d negations", n_inv, n_zero, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
