// tb_er_reg: self-checking test of ER: field loads from a 96-bit word,
// 6-bit shifts, low-byte writes and the 8/6-bit digit multiplexer, against
// a shadow model.
module tb_er_reg;
  import pld_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, shl6, wr_lo, sel8;
  logic [1:0] field, digit_sel;
  word_t word;
  logic [7:0] lo_data, digit;
  logic [23:0] er, model;
  int checks = 0, failures = 0;

  er_reg dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shl6 = 0; wr_lo = 0; sel8 = 0; field = 0; digit_sel = 0; word = 0; lo_data = 0;
    model = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] ed;
      @(negedge clk);
      load = ($urandom_range(0, 3) == 0); shl6 = 1'($urandom); wr_lo = 1'($urandom);
      field = 2'($urandom); word = {$urandom, $urandom, $urandom}; lo_data = 8'($urandom);
      sel8 = 1'($urandom); digit_sel = 2'($urandom);
      #1;
      if (sel8) ed = (digit_sel == 3) ? 8'd0 : model[8*digit_sel +: 8];
      else      ed = {2'b0, model[6*digit_sel +: 6]};
      checks++;
      if (er != model || digit != ed) begin failures++; $display("FAIL er=%h model=%h digit=%h exp %h", er, model, digit, ed); end
      @(posedge clk);
      if (load)      model = word[24*field +: 24];
      else if (shl6) model = model << 6;
      else if (wr_lo) model[7:0] = lo_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
