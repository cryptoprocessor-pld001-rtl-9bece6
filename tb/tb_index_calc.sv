// tb_index_calc: self-checking test of the index registers: every operation
// against a shadow model, the Fig. 6 field decoding and the zero flags.
module tb_index_calc;
  import pld_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, er_wr;
  ix_op_e op;
  logic [1:0] sel, rd_sel, field_idx, digit_idx;
  logic [7:0] imm, er_lo, er_wdata;
  logic [2:0] word_idx;
  logic [3:0] zero;
  logic [7:0] x_out [4];
  logic [7:0] m [4];
  int checks = 0, failures = 0;

  index_calc dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    valid = 0; op = IX_LDI; sel = 0; rd_sel = 0; imm = 0; er_lo = 0;
    for (int i = 0; i < 4; i++) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] nv;
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0); op = ix_op_e'($urandom_range(0, 9));
      sel = 2'($urandom); rd_sel = 2'($urandom); imm = (i % 7 == 0) ? 8'd0 : 8'($urandom);
      er_lo = 8'($urandom);
      #1;
      chk(word_idx == m[rd_sel][6:4] && field_idx == m[rd_sel][3:2] && digit_idx == m[rd_sel][1:0],
          "decode");
      for (int k = 0; k < 4; k++) chk(zero[k] == (m[k] == 0) && x_out[k] == m[k], "zero/x");
      chk(er_wr == (valid && op == IX_TOER) && (!er_wr || er_wdata == m[sel]), "er write");
      nv = m[sel];
      case (op)
        IX_LDI: nv = imm;            IX_ADDI: nv = m[sel] + imm;
        IX_ANDI: nv = m[sel] & imm;  IX_ORI: nv = m[sel] | imm;
        IX_XORI: nv = m[sel] ^ imm;  IX_ANDE: nv = m[sel] & er_lo;
        IX_ORE: nv = m[sel] | er_lo; IX_XORE: nv = m[sel] ^ er_lo;
        IX_FRER: nv = er_lo;         default: ;
      endcase
      @(posedge clk);
      if (valid) m[sel] = nv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
