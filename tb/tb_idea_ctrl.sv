// tb_idea_ctrl: self-checking test of the 50-cycle IDEA engine running on the
// shared ALU with its keys in a RAM128 model.
// Checks the published test vector (key 0001..0008, plaintext 0000 0001 0002
// 0003 -> ciphertext 11FB ED2B 0198 6DE5), random keys and blocks against the
// reference model, decryption with the inverted key set at a second key
// base, that every transform keeps busy high for exactly 50 cycles, and that
// blocks started in the last cycle of the previous one follow every 50
// cycles with correct results.
module tb_idea_ctrl;
  import pld_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, busy, ready, done;
  sub_t x_in [4], y_out [4];
  logic [6:0] key_base, key_addr;
  word_t key_word;
  logic [7:0] state_code;
  logic alu_mul, iadd_en;
  sub_t ia0, ib0, ia1, ib1, iadd, ir0, ir1;
  logic we; logic [6:0] waddr; word_t wdata;
  word_t unused_sum; carry_t unused_c, unused_cq;
  int checks = 0, failures = 0;

  idea_ctrl #(.AW(7)) dut (.*);
  pld_alu u_alu (.clk, .rst_n, .idea_mode(1'b1), .i_mul(alu_mul), .ia0, .ib0, .ia1, .ib1,
                 .iadd, .iadd_en, .ir0, .ir1, .la('0), .lb('0), .ld('0), .lneg(1'b0),
                 .l_first(1'b1), .l_cinit('0), .l_en(1'b0), .lsum(unused_sum),
                 .lcout(unused_c), .lcarry_q(unused_cq));
  pld_ram #(.DEPTH(128), .W(96)) u_ram (.clk, .we, .waddr, .wdata, .raddr(key_addr), .rdata(key_word));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_keys(input sk_t z, input int base);
    for (int n = 0; n < 9; n++) begin
      @(negedge clk); we = 1; waddr = 7'(base + n); wdata = idea_ref_pkg::key_word(z, n);
    end
    @(negedge clk); we = 0;
  endtask

  task automatic run(input logic [63:0] blk, input int base, output logic [63:0] res);
    int cyc;
    @(negedge clk);
    {x_in[0], x_in[1], x_in[2], x_in[3]} = blk;
    key_base = 7'(base); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    res = {y_out[0], y_out[1], y_out[2], y_out[3]};
    checks++;
    if (cyc != 50) begin failures++; $display("FAIL busy for %0d cycles", cyc); end
  endtask

  initial begin
    sk_t z, d;
    logic [63:0] c, p;
    start = 0; we = 0; waddr = 0; wdata = 0; key_base = 0;
    for (int i = 0; i < 4; i++) x_in[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    z = ref_keys({16'd1, 16'd2, 16'd3, 16'd4, 16'd5, 16'd6, 16'd7, 16'd8});
    load_keys(z, 0);
    run(64'h0000_0001_0002_0003, 0, c);
    checks++;
    if (c != 64'h11FB_ED2B_0198_6DE5) begin failures++; $display("FAIL test vector got %h", c); end
    checks++;
    if (c != ref_crypt(64'h0000_0001_0002_0003, z)) begin failures++; $display("FAIL ref model"); end

    for (int k = 0; k < 6; k++) begin
      logic [127:0] key;
      key = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) key[127:96] = 0;            // zero subkeys
      z = ref_keys(key);
      d = ref_dec_keys(z);
      load_keys(z, 16);
      load_keys(d, 32);
      for (int i = 0; i < 10; i++) begin
        logic [63:0] pt;
        pt = {$urandom, $urandom};
        if (i == 0) pt = 64'h0;
        run(pt, 16, c);
        checks++;
        if (c != ref_crypt(pt, z)) begin failures++; $display("FAIL enc %h -> %h exp %h", pt, c, ref_crypt(pt, z)); end
        run(c, 32, p);
        checks++;
        if (p != pt) begin failures++; $display("FAIL dec %h -> %h exp %h", c, p, pt); end
      end
    end
    // back-to-back stream: each new block is offered while ready is high
    begin
      logic [63:0] pts [6];
      int ndone = 0, last = 0, cyc = 0, nstart = 0;
      for (int i = 0; i < 6; i++) pts[i] = {$urandom, $urandom};
      key_base = 7'd16;
      fork
        while (nstart < 6) begin
          @(negedge clk);
          if (ready) begin
            {x_in[0], x_in[1], x_in[2], x_in[3]} = pts[nstart];
            start = 1; nstart++;
          end else start = 0;
        end
        begin
          while (nstart < 6) @(negedge clk);
          @(negedge clk); start = 0;
        end
        while (ndone < 6) begin
          @(negedge clk); cyc++;
          if (done) begin
            checks++;
            if ({y_out[0], y_out[1], y_out[2], y_out[3]} != ref_crypt(pts[ndone], z)) begin
              failures++; $display("FAIL stream block %0d", ndone);
            end
            if (ndone > 0) begin
              checks++;
              if (cyc - last != 50) begin failures++; $display("FAIL stream spacing %0d", cyc - last); end
            end
            last = cyc; ndone++;
          end
        end
      join
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
