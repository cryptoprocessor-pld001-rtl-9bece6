// tb_pld_ram: self-checking test of the data register memory: random writes
// and reads against a shadow array, and read-before-write on the same address.
module tb_pld_ram;
  logic clk = 0;
  logic we;
  logic [6:0] waddr, raddr;
  logic [95:0] wdata, rdata;
  logic [95:0] shadow [128];
  logic [127:0] valid = '0;
  int checks = 0, failures = 0;

  pld_ram #(.DEPTH(128), .W(96)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = {$urandom, $urandom, $urandom};
      shadow[i] = wdata; valid[i] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 7'($urandom); wdata = {$urandom, $urandom, $urandom};
      raddr = (i % 4 == 0) ? waddr : 7'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
