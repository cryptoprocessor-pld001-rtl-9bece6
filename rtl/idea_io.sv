// idea_io: I/O control of PLD001 in block encryption mode (Sec. 7.4).
//
// Double-buffers the IDEA engine so that I/O overlaps the 50-cycle
// transform. The host writes a 64-bit block as four 16-bit words (X1 first)
// into temporary input registers. Once the fourth word is in and the engine
// is idle, the transform starts and the input registers are free again for
// the next block; a block that is ready when the engine is in the last
// cycle of a transform starts right behind it, so a continuous stream runs
// at one block per 50 cycles. When the engine finishes, its result is
// copied into the output registers and IDIO_RDY (idio_rdy) rises; the
// host reads Y1..Y4 with rd_en (rd_data shows the next word) and idio_rdy
// falls after the fourth read. If the output registers still hold unread words when a result
// arrives, the result waits in the engine and no new transform starts
// until they have been read.
//
// wr_en is taken when in_ready is high; one word per cycle at most. The
// document's host bus needs 4 cycles per I/O operation and offers byte,
// word and serial transfer modes; only the 16-bit word-parallel transfer is
// built here, one word per strobe.
module idea_io
  import pld_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       wr_en,
  input  sub_t       wr_data,
  output logic       in_ready,
  input  logic       rd_en,
  output sub_t       rd_data,
  output logic       idio_rdy,
  output logic [7:0] state_code,
  // IDEA engine
  output logic       eng_start,
  output sub_t       eng_x [4],
  input  logic       eng_busy,
  input  logic       eng_ready,
  input  logic       eng_done,
  input  sub_t       eng_y [4]
);
  sub_t       in_q  [4];
  sub_t       out_q [4];
  logic [2:0] in_cnt, out_cnt;
  logic       pend_q;
  logic       load_out;

  assign in_ready  = enable && (in_cnt != 3'd4);
  // start when the engine can take a block, unless its previous or current
  // result could not be placed in the output registers
  assign eng_start = enable && (in_cnt == 3'd4) && eng_ready && !pend_q &&
                     !(eng_done && out_cnt != 3'd0) && (!eng_busy || out_cnt == 3'd0);
  assign idio_rdy  = (out_cnt != 3'd0);
  assign rd_data   = out_q[2'(3'd4 - out_cnt)];
  assign load_out  = (eng_done || pend_q) && (out_cnt == 3'd0);
  assign state_code = {1'b0, pend_q, in_cnt, out_cnt};
  always_comb for (int i = 0; i < 4; i++) eng_x[i] = in_q[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0; out_cnt <= '0; pend_q <= 1'b0;
      for (int i = 0; i < 4; i++) begin in_q[i] <= '0; out_q[i] <= '0; end
    end else begin
      if (eng_start) in_cnt <= '0;
      else if (wr_en && in_ready) begin
        in_q[in_cnt[1:0]] <= wr_data;
        in_cnt <= in_cnt + 1'b1;
      end
      if (load_out) begin
        for (int i = 0; i < 4; i++) out_q[i] <= eng_y[i];
        out_cnt <= 3'd4;
        pend_q  <= 1'b0;
      end else begin
        if (eng_done) pend_q <= 1'b1;
        if (rd_en && idio_rdy) out_cnt <= out_cnt - 1'b1;
      end
    end
  end
endmodule
