// tb_idea_keysched: self-checking test of the key schedule: the nine key
// words written for random keys and for the key 0001..0008 must match the
// reference subkeys, at base + 0..8, and done must come 53 cycles after start
// (52 subkeys, one per cycle, and the final write).
module tb_idea_keysched;
  import pld_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, we;
  logic [127:0] key;
  logic [6:0] base, waddr;
  word_t wdata;
  word_t got [128];
  int checks = 0, failures = 0;

  idea_keysched #(.AW(7)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (we) got[waddr] <= wdata;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; key = 0; base = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      sk_t z;
      int cyc, nwr;
      key = (t == 0) ? {16'd1, 16'd2, 16'd3, 16'd4, 16'd5, 16'd6, 16'd7, 16'd8}
                     : {$urandom, $urandom, $urandom, $urandom};
      base = 7'($urandom_range(0, 100));
      for (int i = 0; i < 128; i++) got[i] = '0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; nwr = 0;
      while (!done) begin if (we) nwr++; cyc++; @(negedge clk); end
      if (we) nwr++;
      @(negedge clk);          // the last word is written at the end of the done cycle
      z = ref_keys(key);
      if (t == 0) begin
        checks++;
        if (z[8] != 16'h0400 || z[48] != 16'h0080) begin failures++; $display("FAIL reference subkeys"); end
      end
      for (int n = 0; n < 9; n++) begin
        checks++;
        if (got[base + n] != idea_ref_pkg::key_word(z, n)) begin
          failures++; $display("FAIL key word %0d: %h exp %h", n, got[base+n], idea_ref_pkg::key_word(z, n));
        end
      end
      checks++;
      if (cyc != 53 || nwr != 9) begin failures++; $display("FAIL cycles %0d writes %0d", cyc, nwr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
