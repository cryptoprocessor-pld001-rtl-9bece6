// tb_pld_alu: self-checking test of the shared ALU.
// IDEA mode: two-cycle modular multiplications modulo 2^16+1 on both pairs,
// with and without the extra addend, against the reference model,
// including the zero (2^16) subblock. Long mode: 96-bit multiply-add with
// signed carry against wide integer arithmetic, and a multi-word carry chain.
module tb_pld_alu;
  import pld_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic idea_mode, i_mul, iadd_en, lneg, l_first, l_en;
  sub_t ia0, ib0, ia1, ib1, iadd, ir0, ir1;
  word_t la, lb, lsum;
  logic [7:0] ld;
  carry_t l_cinit, lcout, lcarry_q;
  int checks = 0, failures = 0;

  pld_alu dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic sub_t pick16();
    case ($urandom_range(0, 5))
      0: return 16'd0;
      1: return 16'd1;
      2: return 16'hffff;
      default: return 16'($urandom);
    endcase
  endfunction

  // one IDEA multiplication on both pairs
  task automatic idea_mul(input sub_t a0, b0, a1, b1, input logic use_add, input sub_t add);
    sub_t e0, e1;
    @(negedge clk);
    idea_mode = 1; i_mul = 1; ia0 = a0; ib0 = b0; ia1 = a1; ib1 = b1; iadd_en = 0;
    @(negedge clk);
    i_mul = 0; iadd_en = use_add; iadd = add;
    #1;
    e0 = ref_mul(a0, b0);
    e1 = use_add ? sub_t'(ref_mul(a1, b1) + add) : ref_mul(a1, b1);
    chk(ir0 == e0, $sformatf("ir0 %h*%h = %h exp %h", a0, b0, ir0, e0));
    chk(ir1 == e1, $sformatf("ir1 %h*%h (+%h,%b) = %h exp %h", a1, b1, add, use_add, ir1, e1));
  endtask

  initial begin
    idea_mode = 0; i_mul = 0; iadd_en = 0; lneg = 0; l_first = 1; l_en = 0;
    ia0 = 0; ib0 = 0; ia1 = 0; ib1 = 0; iadd = 0; la = 0; lb = 0; ld = 0; l_cinit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // IDEA corner cases
    idea_mul(16'd0, 16'd0, 16'd0, 16'h8000, 0, 0);
    idea_mul(16'h8000, 16'd0, 16'd1, 16'd0, 0, 0);
    idea_mul(16'hffff, 16'hffff, 16'h0002, 16'h8001, 0, 0);
    for (int i = 0; i < 1500; i++) begin
      sub_t a, b;
      a = pick16(); b = pick16();
      if (i % 2 == 0) idea_mul(a, b, pick16(), pick16(), 0, 0);
      else            idea_mul(a, b, a, b, 1, pick16());
    end
    // long mode, single words
    @(negedge clk);
    idea_mode = 0; i_mul = 0;
    for (int i = 0; i < 1500; i++) begin
      logic signed [110:0] e;
      la = {$urandom, $urandom, $urandom}; lb = {$urandom, $urandom, $urandom};
      ld = 8'($urandom); lneg = 1'($urandom); l_first = 1;
      l_cinit = carry_t'($signed(12'($urandom_range(0, 511))) - 12'sd256);
      #1;
      e = $signed({15'b0, la}) + (lneg ? -($signed({15'b0, lb}) * $signed({103'b0, ld}))
                                      :  ($signed({15'b0, lb}) * $signed({103'b0, ld}))) + 111'(l_cinit);
      chk(lsum == e[95:0] && lcout == carry_t'(e >>> 96),
          $sformatf("long a=%h b=%h d=%h neg=%b", la, lb, ld, lneg));
      @(negedge clk);
    end
    // long mode, 4-word chain through the carry register: X - d*Y
    for (int t = 0; t < 50; t++) begin
      logic [383:0] xv, yv, rv;
      logic signed [400:0] e;
      xv = {12{$urandom}}; yv = {12{$urandom}}; for (int i = 0; i < 12; i++) begin xv[32*i +: 32] = $urandom; yv[32*i +: 32] = $urandom; end
      ld = 8'($urandom); lneg = 1; l_en = 1;
      for (int w = 0; w < 4; w++) begin
        la = xv[96*w +: 96]; lb = yv[96*w +: 96]; l_first = (w == 0); l_cinit = 0;
        #1; rv[96*w +: 96] = lsum;
        @(negedge clk);
      end
      e = $signed({17'b0, xv}) - $signed({17'b0, yv}) * $signed({393'b0, ld});
      chk(rv == e[383:0] && lcarry_q == carry_t'(e >>> 384), $sformatf("chain t=%0d", t));
    end
    l_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
