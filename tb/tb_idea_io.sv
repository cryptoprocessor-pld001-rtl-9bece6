// tb_idea_io: self-checking test of the block I/O double buffering, with a
// simple stand-in for the IDEA engine (50 cycles busy, then done; result is
// a fixed function of the input block). Blocks are streamed in while the
// engine works, outputs must come out complete and in order, a slow reader
// must stall the engine without losing a result, and the input must be
// refused while the input registers are full. A fast stream must start a
// new block every 50 cycles, right behind the previous one, also when all
// reads and writes share one bus and each takes 4 cycles (4*4*2 = 32 bus
// cycles per block, which must fit in the 50 cycles of a transform).
module tb_idea_io;
  import pld_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable, wr_en, in_ready, rd_en, idio_rdy, eng_start, eng_busy, eng_ready, eng_done;
  sub_t wr_data, rd_data;
  sub_t eng_x [4], eng_y [4];
  logic [7:0] state_code;
  int checks = 0, failures = 0, starts = 0, stalls = 0, overlaps = 0;
  int busy_cnt, cyc = 0, last_start = -1000, min_gap = 1000, gap50 = 0;
  logic [63:0] nxt;
  logic [63:0] sent [$];

  idea_io dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] f(input logic [63:0] v);
    return {v[31:0], v[63:32]} ^ 64'h0123_4567_89ab_cdef;
  endfunction

  // engine stand-in with the timing of idea_ctrl: ready in idle and in the
  // last busy cycle, result shown when the transform ends
  assign eng_ready = !eng_busy || busy_cnt == 1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eng_busy <= 0; eng_done <= 0; busy_cnt <= 0; nxt <= 0;
      for (int i = 0; i < 4; i++) eng_y[i] <= 0;
    end else begin
      cyc++;
      eng_done <= 0;
      if (eng_busy) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          eng_busy <= 0; eng_done <= 1;
          {eng_y[0], eng_y[1], eng_y[2], eng_y[3]} <= nxt;
        end
      end
      if (eng_ready && eng_start) begin
        eng_busy <= 1; busy_cnt <= 50; starts++;
        nxt <= f({eng_x[0], eng_x[1], eng_x[2], eng_x[3]});
        if (cyc - last_start < min_gap) min_gap = cyc - last_start;
        if (cyc - last_start == 50) gap50++;
        last_start = cyc;
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: streams blocks as fast as in_ready allows
  task automatic writer(input int nblk);
    for (int b = 0; b < nblk; b++) begin
      logic [63:0] blk;
      blk = {$urandom, $urandom};
      sent.push_back(blk);
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        while (!in_ready) begin
          if (eng_busy) overlaps++;
          @(negedge clk);
        end
        if (eng_busy) overlaps++;
        wr_en = 1; wr_data = blk[63 - 16*i -: 16];
        @(negedge clk); wr_en = 0;
      end
    end
  endtask

  task automatic reader(input int nblk, input int slow);
    for (int b = 0; b < nblk; b++) begin
      logic [63:0] got, exp;
      @(negedge clk);
      while (!idio_rdy) @(negedge clk);
      if (slow) begin
        repeat (120) @(negedge clk);
        if (dut.pend_q) stalls++;
      end
      for (int i = 0; i < 4; i++) begin
        got[63 - 16*i -: 16] = rd_data;
        rd_en = 1; @(negedge clk); rd_en = 0;
      end
      exp = f(sent.pop_front());
      checks++;
      if (got != exp) begin failures++; $display("FAIL block %0d got %h exp %h", b, got, exp); end
    end
  endtask

  // one shared bus, one 4-cycle operation at a time, reads first
  task automatic bus_stream(input int nblk, output int gaps_ok, output int gaps_bad);
    int wb = 0, ww = 0, rb = 0, rw = 0, s0, last;
    logic [63:0] blk, got;
    gaps_ok = 0; gaps_bad = 0; s0 = starts; last = -1;
    while (rb < nblk) begin
      @(negedge clk);
      if (idio_rdy) begin
        got[63 - 16*rw -: 16] = rd_data;
        rd_en = 1; @(negedge clk); rd_en = 0;
        repeat (2) @(negedge clk);
        rw++;
        if (rw == 4) begin
          checks++;
          if (got != f(sent.pop_front())) begin failures++; $display("FAIL bus block %0d", rb); end
          rw = 0; rb++;
        end
      end else if (wb < nblk && in_ready) begin
        if (ww == 0) begin blk = {$urandom, $urandom}; sent.push_back(blk); end
        wr_en = 1; wr_data = blk[63 - 16*ww -: 16];
        @(negedge clk); wr_en = 0;
        repeat (2) @(negedge clk);
        ww++;
        if (ww == 4) begin ww = 0; wb++; end
      end
      if (starts != s0) begin
        if (last >= 0) begin
          if (last_start - last == 50) gaps_ok++; else gaps_bad++;
        end
        last = last_start; s0 = starts;
      end
    end
  endtask

  initial begin
    int gaps_ok, gaps_bad;
    enable = 1; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    fork writer(8); reader(8, 0); join
    fork writer(6); reader(6, 1); join
    bus_stream(10, gaps_ok, gaps_bad);
    checks++;
    if (gaps_bad != 0 || gaps_ok < 8) begin
      failures++; $display("FAIL shared 4-cycle bus: %0d gaps of 50, %0d others", gaps_ok, gaps_bad);
    end
    checks++;
    if (starts != 24) begin failures++; $display("FAIL %0d transforms started", starts); end
    checks++;
    if (min_gap != 50 || gap50 < 5) begin
      failures++; $display("FAIL start spacing: min %0d, %0d back-to-back", min_gap, gap50);
    end
    checks++;
    if (overlaps == 0) begin failures++; $display("FAIL no input written during a transform"); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no result held for a slow reader"); end
    $display("overlaps=%0d stalls=%0d", overlaps, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
