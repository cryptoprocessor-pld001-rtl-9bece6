// idea_ctrl: the IDEA control of PLD001 (Sec. 6, 7.4, Fig. 2, Table 1).
//
// Runs one IDEA transform of a 64-bit block (four 16-bit subblocks) in 50
// cycles on the shared ALU in IDEA multiply mode: eight rounds of six cycles
// and an output transform of two. Every modular multiplication modulo 2^16+1
// is a multiply cycle followed by a reduce cycle, following Table 1:
//   step 0  T := I1*K1, I4*K4          A1 := I2+K2, A2 := I3+K3 (16-bit adders)
//   step 1  M1, M2 (low-high reduction)
//   step 2  T := X1*K5 on both pairs   X1 = M1 xor A2
//   step 3  M3 and A3 = M3 + X2        X2 = A1 xor M2
//   step 4  T := A3*K6 on both pairs
//   step 5  M4 and A4 = M4 + M3;  next input (M1^M4, A2^M4, A1^A4, M2^A4)
// The output transform is steps 0 and 1 with the key subblocks of word 9:
// Y1 = I1*Z1, Y2 = I3+Z2, Y3 = I2+Z3, Y4 = I4*Z4 (the exchange of the middle
// subblocks done by every round is undone here).
//
// Keys: round r (0..8) reads the 96-bit RAM128 word at key_base + r, with
// subkey Zk in bits 16k-1..16k-16 (k = 1..6; word 9 uses Z1..Z4 only). The
// same engine decrypts when key_base points at a decryption key set.
//
// Timing: start is taken with x_in while ready is high: in idle, or in the
// last cycle of a transform, so that blocks can follow each other every 50
// cycles. Each transform keeps busy high for exactly 50 cycles; done pulses
// in the cycle after its last one, with y_out valid from then until the end
// of the next transform. The schedule and the cycle count are the document's; the
// key word layout is this design's.
module idea_ctrl
  import pld_pkg::*;
#(
  parameter int AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  sub_t          x_in [4],
  input  logic [AW-1:0] key_base,
  output logic          busy,
  output logic          ready,
  output logic          done,
  output sub_t          y_out [4],
  output logic [7:0]    state_code,
  // key word from RAM128
  output logic [AW-1:0] key_addr,
  input  word_t         key_word,
  // ALU, IDEA mode
  output logic          alu_mul,
  output sub_t          ia0, ib0, ia1, ib1,
  output sub_t          iadd,
  output logic          iadd_en,
  input  sub_t          ir0, ir1
);
  sub_t       i_q [4];
  sub_t       a1_q, a2_q, m1_q, m2_q, m3_q, a3_q;
  logic [3:0] r_q;        // round 0..7, 8 = output transform
  logic [2:0] s_q;        // step 0..5
  logic       run_q, done_q;
  sub_t       k [6];
  sub_t       x1, x2, m4, a4;

  always_comb for (int i = 0; i < 6; i++) k[i] = key_word[16*i +: 16];

  assign key_addr   = key_base + AW'(r_q);
  logic last_step;
  assign last_step  = run_q && (r_q == 4'd8) && (s_q == 3'd1);
  assign busy       = run_q;
  assign ready      = !run_q || last_step;
  assign done       = done_q;
  assign state_code = {run_q, r_q, s_q};
  assign x1 = m1_q ^ a2_q;
  assign x2 = a1_q ^ m2_q;
  assign m4 = ir0;
  assign a4 = ir1;

  always_comb begin
    alu_mul = 1'b0;
    ia0 = '0; ib0 = '0; ia1 = '0; ib1 = '0;
    iadd = '0; iadd_en = 1'b0;
    if (run_q) begin
      unique case (s_q)
        3'd0: begin alu_mul = 1'b1; ia0 = i_q[0]; ib0 = k[0]; ia1 = i_q[3]; ib1 = k[3]; end
        3'd2: begin alu_mul = 1'b1; ia0 = x1; ib0 = k[4]; ia1 = x1; ib1 = k[4]; end
        3'd3: begin iadd = x2; iadd_en = 1'b1; end
        3'd4: begin alu_mul = 1'b1; ia0 = a3_q; ib0 = k[5]; ia1 = a3_q; ib1 = k[5]; end
        3'd5: begin iadd = m3_q; iadd_en = 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; done_q <= 1'b0; r_q <= '0; s_q <= '0;
      a1_q <= '0; a2_q <= '0; m1_q <= '0; m2_q <= '0; m3_q <= '0; a3_q <= '0;
      for (int i = 0; i < 4; i++) begin i_q[i] <= '0; y_out[i] <= '0; end
    end else begin
      done_q <= 1'b0;
      if (!run_q) begin
        if (start) begin
          for (int i = 0; i < 4; i++) i_q[i] <= x_in[i];
          run_q <= 1'b1; r_q <= '0; s_q <= '0;
        end
      end else begin
        s_q <= s_q + 1'b1;
        unique case (s_q)
          3'd0: begin
            if (r_q == 4'd8) begin
              a1_q <= i_q[2] + k[1];     // Y2
              a2_q <= i_q[1] + k[2];     // Y3
            end else begin
              a1_q <= i_q[1] + k[1];
              a2_q <= i_q[2] + k[2];
            end
          end
          3'd1: begin
            m1_q <= ir0; m2_q <= ir1;
            if (r_q == 4'd8) begin
              y_out[0] <= ir0; y_out[1] <= a1_q; y_out[2] <= a2_q; y_out[3] <= ir1;
              run_q  <= 1'b0;
              done_q <= 1'b1;
              if (start) begin               // chained start: next block at once
                for (int i = 0; i < 4; i++) i_q[i] <= x_in[i];
                run_q <= 1'b1; r_q <= '0; s_q <= '0;
              end
            end
          end
          3'd3: begin m3_q <= ir0; a3_q <= ir1; end
          3'd5: begin
            i_q[0] <= m1_q ^ m4;
            i_q[1] <= a2_q ^ m4;
            i_q[2] <= a1_q ^ a4;
            i_q[3] <= m2_q ^ a4;
            r_q <= r_q + 1'b1;
            s_q <= '0;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
