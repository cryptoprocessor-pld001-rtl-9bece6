// index_calc: the INDEX_CALC unit of PLD001 (Sec. 7.2, Fig. 6, Fig. 7).
//
// Four 8-bit index registers X0..X3 address entities inside a 768-bit data
// register as laid out in Fig. 6: bits 6..4 select one of eight 96-bit words,
// bits 3..2 one of four 24-bit fields of that word and bits 1..0 one of four
// 6-bit (or 8-bit) digits of the field. Bit 7 carries no address.
// One operation per cycle (valid, op, sel, imm) updates index register
// Xsel with an immediate or with ER[7:0] (load, add, and, or, xor), or moves
// between Xsel and ER[7:0] (er_wr / er_wdata go to the ER register).
// The fields of the index register named by rd_sel are decoded
// combinationally on word_idx / field_idx / digit_idx; zero[i] flags Xi == 0
// so that a sequencer can count down loops.
//
// The layout follows Fig. 6; the operation set is this design's reading of
// "logic operations between immediate values, index registers and ER".
module index_calc
  import pld_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  ix_op_e     op,
  input  logic [1:0] sel,
  input  logic [7:0] imm,
  input  logic [7:0] er_lo,
  output logic       er_wr,
  output logic [7:0] er_wdata,
  input  logic [1:0] rd_sel,
  output logic [2:0] word_idx,
  output logic [1:0] field_idx,
  output logic [1:0] digit_idx,
  output logic [3:0] zero,
  output logic [7:0] x_out [4]
);
  logic [7:0] x_q [4];
  logic [7:0] nxt;
  logic       upd;

  always_comb begin
    nxt = x_q[sel];
    upd = valid;
    unique case (op)
      IX_LDI:  nxt = imm;
      IX_ADDI: nxt = x_q[sel] + imm;
      IX_ANDI: nxt = x_q[sel] & imm;
      IX_ORI:  nxt = x_q[sel] | imm;
      IX_XORI: nxt = x_q[sel] ^ imm;
      IX_ANDE: nxt = x_q[sel] & er_lo;
      IX_ORE:  nxt = x_q[sel] | er_lo;
      IX_XORE: nxt = x_q[sel] ^ er_lo;
      IX_FRER: nxt = er_lo;
      default: upd = 1'b0;   // IX_TOER and unused codes leave Xsel alone
    endcase
    er_wr    = valid && (op == IX_TOER);
    er_wdata = x_q[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 4; i++) x_q[i] <= '0;
    else if (upd) x_q[sel] <= nxt;
  end

  always_comb begin
    word_idx  = x_q[rd_sel][6:4];
    field_idx = x_q[rd_sel][3:2];
    digit_idx = x_q[rd_sel][1:0];
    for (int i = 0; i < 4; i++) begin
      zero[i]  = (x_q[i] == 8'd0);
      x_out[i] = x_q[i];
    end
  end
endmodule
