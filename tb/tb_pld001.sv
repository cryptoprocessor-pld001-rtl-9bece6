// tb_pld001: end-to-end test of the PLD001 top level at its default size
// (768-bit registers, 128-word RAM128).
//   1. key schedule writes an IDEA encryption key set; the host writes the
//      decryption key set (computed here) at another base;
//   2. block encryption mode: blocks are streamed through the I/O buffers,
//      encrypted, then decrypted back, against the reference model; a slow
//      reader makes a finished result wait; with a fast reader, blocks must
//      follow each other without a gap (one per 50 cycles);
//   3. long mode: an RSA exponentiation C = M^e mod N by the left-to-right
//      binary method, one MODMUL and one STORE8 command per step, checked
//      against wide integer arithmetic; a modulus with top word 1 forces the
//      full compare of the binary search;
//   4. index registers, set while a modular multiply runs, address a field
//      for an ER load, and MULD uses its digit;
//   5. I/O mode hides all but registers 14 and 15; the self-test signature
//      shows only in test mode.
// Each mechanism is counted and must have happened at least once.
module tb_pld001;
  import pld_pkg::*;
  import idea_ref_pkg::*;

  localparam int RW = REG_WORDS;
  localparam int NB = 96 * RW;

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

  int checks = 0, failures = 0;
  int n_overlap = 0, n_fullcmp = 0, n_hold = 0, n_hidden = 0, n_modmul = 0, n_switch = 0,
      n_dec = 0, n_erld = 0, n_upd = 0, n_chain = 0, n_par = 0;

  pld001 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_fullcmp) n_fullcmp++;
    if (st_upd) n_upd++;
    if (io_wr && idea_busy) n_overlap++;
    if (dut.eng_start && idea_busy) n_chain++;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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
  task automatic get_reg(input int r, input logic sel8, output logic [NB-1:0] v);
    for (int w = 0; w < RW; w++) begin
      @(negedge clk); host_sel8 = sel8; host_addr = sel8 ? 7'(w) : 7'(r * RW + w);
      #1 v[96*w +: 96] = host_rdata;
    end
    host_sel8 = 0;
  endtask

  task automatic command(input seq_cmd_e c, input int a, input int b, input int n, input int l);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_ra = 4'(a); cmd_rb = 4'(b); cmd_rc = 4'(n); cmd_len = 6'(l);
    @(negedge clk); cmd_valid = 0;
    while (!cmd_done) @(negedge clk);
    if (c == SEQ_MODMUL) n_modmul++;
  endtask

  // IDEA: stream blocks in, read results; slow: the reader waits 120 cycles
  task automatic idea_stream(input logic [63:0] in_blk [], output logic [63:0] out_blk [], input logic slow);
    out_blk = new[in_blk.size()];
    fork
      begin
        foreach (in_blk[b]) for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          while (!io_in_ready) @(negedge clk);
          io_wr = 1; io_wdata = in_blk[b][63 - 16*i -: 16];
          @(negedge clk); io_wr = 0;
        end
      end
      begin
        foreach (out_blk[b]) begin
          @(negedge clk);
          while (!idio_rdy) @(negedge clk);
          if (slow) begin
            repeat (120) @(negedge clk);
            if (dut.u_io.pend_q) n_hold++;
          end
          for (int i = 0; i < 4; i++) begin
            out_blk[b][63 - 16*i -: 16] = io_rdata;
            io_rd = 1; @(negedge clk); io_rd = 0;
          end
        end
      end
    join
  endtask

  initial begin
    logic [127:0] key;
    sk_t z, d;
    logic [63:0] pt [], ct [], back [];
    logic [NB-1:0] n, m, c, e_ref, v, r5;
    logic [4:0] ebits;
    logic [31:0] sig1;

    mode_idea = 0; wait_mode = 1; test_mode = 1;
    cmd_valid = 0; cmd = SEQ_LOAD8; cmd_ra = 0; cmd_rb = 0; cmd_rc = 0; cmd_len = 0;
    ix_valid = 0; ix_op = IX_LDI; ix_sel = 0; ix_rd_sel = 0; ix_imm = 0;
    er_ld_valid = 0; er_ld_reg = 0;
    host_we = 0; host_sel8 = 0; host_addr = 0; host_wdata = 0;
    ks_start = 0; ks_key = 0; ks_base = 0; key_base = 0;
    io_wr = 0; io_wdata = 0; io_rd = 0; st_clr = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- 1. keys ----
    key = {$urandom, $urandom, $urandom, $urandom};
    z = ref_keys(key);
    d = ref_dec_keys(z);
    @(negedge clk); ks_key = key; ks_base = 7'd0; ks_start = 1;
    @(negedge clk); ks_start = 0;
    while (!ks_done) @(negedge clk);
    @(negedge clk);
    for (int k = 0; k < 9; k++) host_write(16 + k, idea_ref_pkg::key_word(d, k));
    get_reg(0, 0, v);
    chk(v[95:0] == idea_ref_pkg::key_word(z, 0), "key schedule word 0 in RAM128");

    // ---- 2. block encryption ----
    pt = new[6];
    foreach (pt[i]) pt[i] = {$urandom, $urandom};
    @(negedge clk); mode_idea = 1; key_base = 7'd0; n_switch++;
    idea_stream(pt, ct, 1'b0);
    foreach (ct[i]) chk(ct[i] == ref_crypt(pt[i], z), $sformatf("IDEA encrypt block %0d", i));
    @(negedge clk); key_base = 7'd16;
    idea_stream(ct, back, 1'b1);
    foreach (back[i]) begin
      chk(back[i] == pt[i], $sformatf("IDEA decrypt block %0d", i));
      if (back[i] == pt[i]) n_dec++;
    end
    @(negedge clk); mode_idea = 0; n_switch++;

    // ---- 3. RSA exponentiation, LR binary method, e = 10111b ----
    n = rnd(); n[NB-1] = 1;
    m = rnd() % n;
    ebits = 5'b10111;
    put_reg(1, m);             // M
    put_reg(3, n);             // N
    put_reg(4, m);             // C := M (top exponent bit is 1)
    e_ref = m;
    for (int i = 3; i >= 0; i--) begin
      command(SEQ_MODMUL, 4, 4, 3, 4 * RW); command(SEQ_STORE8, 4, 0, 0, 0);
      e_ref = mulmod(e_ref, e_ref, n);
      if (ebits[i]) begin
        command(SEQ_MODMUL, 4, 1, 3, 4 * RW); command(SEQ_STORE8, 4, 0, 0, 0);
        e_ref = mulmod(e_ref, m, n);
      end
    end
    command(SEQ_LOAD8, 4, 0, 0, 0);
    command(SEQ_STORE8, 15, 0, 0, 0);
    get_reg(15, 0, v);
    chk(v == e_ref, "RSA M^e mod N");
    // modulus with top word 1: ambiguous top-word estimates
    n = rnd(); n[NB-1:NB-96] = 96'd1;
    m = rnd() % n; c = rnd() % n;
    put_reg(6, n); put_reg(7, m); put_reg(8, c);
    // index calculation runs in parallel with the modular multiply:
    // X1 := 00100101b - 1, X1 := X1 + 1 (word 2, field 1, digit 1)
    fork
      command(SEQ_MODMUL, 7, 8, 6, 4 * RW);
      begin
        repeat (100) @(negedge clk);
        ix_valid = 1; ix_op = IX_LDI; ix_sel = 2'd1; ix_imm = {1'b0, 3'd2, 2'd1, 2'd1} - 8'd1;
        #1 if (cmd_busy) n_par++;
        @(negedge clk); ix_op = IX_ADDI; ix_imm = 8'd1;
        #1 if (cmd_busy) n_par++;
        @(negedge clk); ix_valid = 0;
      end
    join
    get_reg(0, 1, v);
    chk(v == mulmod(m, c, n), "modmul with full compares");

    // ---- 4. index registers, ER load, MULD ----
    @(negedge clk); ix_rd_sel = 2'd1;
    @(negedge clk); er_ld_valid = 1; er_ld_reg = 4'd7;
    @(negedge clk); er_ld_valid = 0;
    #1;
    chk(er_out == m[96*2 + 24 +: 24], "ER load through index register");
    if (er_out == m[96*2 + 24 +: 24]) n_erld++;
    r5 = rnd(); put_reg(5, r5);
    command(SEQ_LOAD8, 5, 0, 0, 0);
    command(SEQ_MULD, 7, 0, 0, 0);
    get_reg(0, 1, v);
    chk(v == NB'(r5 + m * er_out[15:8]), "MULD with ER digit 1");

    // ---- 5. access rules ----
    @(negedge clk); wait_mode = 0; test_mode = 0;
    get_reg(15, 0, v);
    chk(v == e_ref, "register 15 readable in I/O mode");
    get_reg(1, 0, v);
    chk(v == '0, "register 1 hidden in I/O mode");
    if (v == '0) n_hidden++;
    get_reg(0, 1, v);
    chk(v == '0, "RAM8 hidden in I/O mode");
    #1 chk(er_out == '0 && st_sig == '0, "ER and signature hidden");
    @(negedge clk); test_mode = 1; #1 sig1 = st_sig;
    chk(sig1 != 0 && n_upd > 0, $sformatf("self-test signature %h after %0d updates", sig1, n_upd));

    $display("mechanisms: overlap=%0d hold=%0d fullcmp=%0d modmul=%0d switch=%0d dec=%0d erld=%0d hidden=%0d sigupd=%0d chain=%0d par=%0d",
             n_overlap, n_hold, n_fullcmp, n_modmul, n_switch, n_dec, n_erld, n_hidden, n_upd, n_chain, n_par);
    chk(n_overlap > 0, "I/O overlapped with a transform");
    chk(n_hold > 0, "result held for a slow reader");
    chk(n_chain > 0, "block started right behind the previous one");
    chk(n_par > 0, "index command during a modular multiply");
    chk(n_fullcmp > 0, "full compare in binary search");
    chk(n_modmul > 0 && n_switch > 0 && n_dec > 0 && n_erld > 0 && n_hidden > 0, "other mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
