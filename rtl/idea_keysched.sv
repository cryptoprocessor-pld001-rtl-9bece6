// idea_keysched: IDEA encryption key schedule (Sec. 6.4).
//
// Expands a 128-bit user key into the 52 encryption subkeys and writes them
// to RAM128 as nine 96-bit key words, six subkeys per word in the order
// Z1(r)..Z6(r) (word 9 holds Z1(9)..Z4(9) and zeros), the layout idea_ctrl
// reads. Subkeys are taken eight at a time from the key register, most
// significant 16 bits first; after each eight the key register is rotated
// left by 25 bits.
//
// Timing: start (with key) is taken when idle; the unit then produces one
// subkey per cycle (52 cycles), writes word n at base+n as soon as it is
// complete (we pulses nine times) and pulses done after the last write.
// The schedule is the document's; the one-subkey-per-cycle sequencing and
// the word layout are this design's.
module idea_keysched
  import pld_pkg::*;
#(
  parameter int AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [127:0]  key,
  input  logic [AW-1:0] base,
  output logic          busy,
  output logic          done,
  output logic          we,
  output logic [AW-1:0] waddr,
  output word_t         wdata
);
  logic [127:0]  k_q;
  logic [5:0]    n_q;     // subkey number 0..51
  logic [2:0]    e_q;     // subkey within the current eight
  logic [2:0]    p_q;     // slot within the key word
  logic [3:0]    wd_q;    // key word number
  logic [79:0]   acc_q;   // subkeys collected for the current word
  logic [AW-1:0] base_q;
  logic          run_q;
  sub_t          zk;
  word_t         word_n;

  assign zk     = k_q[127 - 16*e_q -: 16];
  assign word_n = (p_q == 3'd5) ? {zk, acc_q} : word_t'({zk, acc_q} >> (16 * (5 - int'(p_q))));
  assign busy   = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0; n_q <= '0; e_q <= '0; p_q <= '0; wd_q <= '0; acc_q <= '0;
      base_q <= '0; run_q <= 1'b0; done <= 1'b0; we <= 1'b0; waddr <= '0; wdata <= '0;
    end else begin
      done <= 1'b0;
      we   <= 1'b0;
      if (!run_q) begin
        if (start) begin
          k_q <= key; base_q <= base; run_q <= 1'b1;
          n_q <= '0; e_q <= '0; p_q <= '0; wd_q <= '0; acc_q <= '0;
        end
      end else begin
        // collect subkey n into the current word
        acc_q <= {zk, acc_q[79:16]};
        n_q   <= n_q + 1'b1;
        e_q   <= e_q + 1'b1;
        if (e_q == 3'd7) k_q <= {k_q[102:0], k_q[127:103]};   // rotate left 25
        if (p_q == 3'd5 || n_q == 6'd51) begin
          we    <= 1'b1;
          waddr <= base_q + AW'(wd_q);
          wdata <= word_n;
          wd_q  <= wd_q + 1'b1;
          p_q   <= '0;
          acc_q <= '0;
        end else begin
          p_q <= p_q + 1'b1;
        end
        if (n_q == 6'd51) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end
endmodule
