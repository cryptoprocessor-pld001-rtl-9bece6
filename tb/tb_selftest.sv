// tb_selftest: self-checking test of the state-hashing signature: random
// state streams are hashed by an independent software model of the four
// 8-bit analysers and the 32-bit analyser; the signature must match after
// every group of 255 states, and a single changed state must change it.
module tb_selftest;
  logic clk = 0, rst_n = 0;
  logic clr, step, sig_upd;
  logic [7:0] state [4];
  logic [31:0] sig;
  logic [7:0] an [4];
  logic [31:0] g;
  int cnt, checks = 0, failures = 0, upds = 0;

  selftest #(.N_AN(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] misr8(input logic [7:0] s, input logic [7:0] d);
    return {s[6:0], 1'b0} ^ (s[7] ? 8'h1D : 8'h00) ^ d;
  endfunction
  function automatic logic [31:0] misr32(input logic [31:0] s, input logic [7:0] d);
    return {s[30:0], 1'b0} ^ (s[31] ? 32'h04C11DB7 : 32'h0) ^ {24'h0, d};
  endfunction

  task automatic run(input int groups, input int flip_at, output logic [31:0] result);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 4; i++) an[i] = 0;
    g = 0; cnt = 0;
    for (int s = 0; s < 255 * groups; s++) begin
      step = ($urandom_range(0, 5) != 0);
      while (!step) begin @(negedge clk); step = ($urandom_range(0, 5) != 0); end
      for (int i = 0; i < 4; i++) state[i] = 8'((s * 37 + i * 101) ^ (s >> 3));
      if (s == flip_at) state[2] ^= 8'h10;
      for (int i = 0; i < 4; i++) an[i] = misr8(an[i], state[i]);
      cnt++;
      if (cnt == 255) begin
        for (int i = 0; i < 4; i++) g = misr32(g, an[i]);
        for (int i = 0; i < 4; i++) an[i] = 0;
        cnt = 0;
      end
      @(negedge clk);
      step = 0;
      if (cnt == 0) begin
        repeat (5) @(negedge clk);
        checks++;
        if (sig != g) begin failures++; $display("FAIL sig %h exp %h", sig, g); end
      end
    end
    result = sig;
  endtask

  always @(posedge clk) if (sig_upd) upds++;

  initial begin
    logic [31:0] r1, r2;
    clr = 0; step = 0; for (int i = 0; i < 4; i++) state[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(3, -1, r1);
    run(3, 300, r2);
    checks++;
    if (r1 == r2) begin failures++; $display("FAIL changed state not detected"); end
    checks++;
    if (upds != 6) begin failures++; $display("FAIL %0d signature updates", upds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
