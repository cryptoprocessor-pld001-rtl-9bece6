// tb_alu24: self-checking test of one ALU unit against integer arithmetic.
// Random operands in both product modes; also the 8-argument edge values.
module tb_alu24;
  logic [7:0] a; logic [23:0] b; logic sh8, neg;
  logic signed [35:0] x, y, z, s;
  int checks = 0, failures = 0;

  alu24 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint e, p;
    #1;
    p = longint'(a) * longint'(b);
    if (sh8) p = p * 256;
    e = longint'(x) + longint'(y) + longint'(z) + (neg ? -p : p);
    checks++;
    if (longint'(s) != e) begin
      failures++;
      $display("FAIL a=%h b=%h sh8=%b neg=%b x=%0d y=%0d z=%0d s=%0d exp=%0d", a, b, sh8, neg, x, y, z, s, e);
    end
  endtask

  initial begin
    a = 8'hff; b = 24'hffffff; sh8 = 0; neg = 0; x = 0; y = 0; z = 0; check_one();
    neg = 1; check_one();
    a = 8'hff; b = 24'h10000; sh8 = 1; neg = 0; x = 36'sd1000; check_one();
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); sh8 = 1'($urandom);
      b = sh8 ? 24'($urandom_range(0, 131071)) : 24'($urandom);
      neg = 1'($urandom);
      x = 36'($signed(32'($urandom)) >>> 4); y = 36'($signed(32'($urandom)) >>> 4);
      z = 36'($urandom_range(0, 70000));
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
