// alu_seq: the ALU_SEQUENCER of PLD001 (Sec. 7.2, 7.3, Fig. 7).
//
// Executes arithmetic commands on 768-bit long data registers, one 96-bit
// word per cycle, least significant word first, through the ALU in long mode
// (multiply-add with a signed carry register). R8 is the long register held
// in RAM8; Ra, Rb, Rc are long registers of RAM128.
//
//   LOAD8  R8 := Ra        STORE8 Ra := R8       NEG  R8 := -Ra
//   ADD    R8 := R8 + Ra   SUB    R8 := R8 - Ra  MULD R8 := R8 + digit8*Ra
//   MODMUL R8 := Ra * Rb mod Rc      (requires Rb < Rc; Ra may exceed Rc,
//                                     so Rb = 1 gives R8 := Ra mod Rc)
//
// Simple commands take REG_WORDS cycles plus one; carry_out holds the final
// carry (the bits above 768) of the last simple command.
//
// MODMUL is the document's interleaved high-radix modular multiply, radix
// 2^6: the multiplier Ra is scanned from its top 24-bit field (len fields in
// all) downwards; each field is loaded into ER and used as four 6-bit digits,
// most significant first. Per digit d:
//   1. MUL  (REG_WORDS cycles): R8 := 64*R8 + d*Rb; the 6 bits shifted out of
//      the top word and the carry out form a small guard value g.
//   2. SRCH (7 cycles): binary search, from the top bit down, for the largest
//      7-bit m with R8 - m*Rc >= 0. Each trial compares only the top word:
//      D = g*2^96 + R8[top] - t*Rc[top]. D < 0 rejects the trial, D >= 127
//      accepts it; in between the two numbers are "almost equal" and a full
//      compare over all words (FCMP, REG_WORDS cycles) decides. For random
//      768-bit operands that happens with probability about 2^-89.
//   3. RED  (REG_WORDS cycles): R8 := R8 - m*Rc, which leaves 0 <= R8 < Rc.
//   Then ER is shifted 6 bits. A field costs one extra cycle to load ER.
// At the defaults (8 words, 32 fields) a full 768-bit modular multiply takes
// 32*(1 + 4*(8+7+8)) = 2976 cycles plus the done cycle, and 8 more cycles per
// full compare; the document's count of 2944 leaves out the ER loads.
// ev_fullcmp pulses once per full compare. done pulses for one cycle at the
// end of every command; busy is high from the cycle after cmd_valid is taken.
//
// The document has the microcode subtract m*C by adding m*(-C) after C := -C;
// here the ALU negates the product instead, which gives the same sum without
// overwriting C. The command set and encodings are this design's own.
module alu_seq
  import pld_pkg::*;
#(
  parameter int REG_WORDS_P = REG_WORDS,
  localparam int WAW   = (REG_WORDS_P > 1) ? $clog2(REG_WORDS_P) : 1,
  localparam int AW128 = $clog2(N_REGS * REG_WORDS_P),
  localparam int NFLD  = 4 * REG_WORDS_P,
  localparam int LEN_W = $clog2(NFLD + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             cmd_valid,
  input  seq_cmd_e         cmd,
  input  logic [3:0]       ra, rb, rc,
  input  logic [LEN_W-1:0] len,          // MODMUL: 24-bit fields of Ra, 1..NFLD
  input  logic [7:0]       digit8,       // MULD multiplier digit (from ER)
  output logic             busy,
  output logic             done,
  output carry_t           carry_out,
  output logic             ev_fullcmp,
  output logic [7:0]       state_code,
  // RAM8
  output logic [WAW-1:0]   r8_addr,
  input  word_t            r8_rdata,
  output logic             r8_we,
  output word_t            r8_wdata,
  // RAM128
  output logic [AW128-1:0] r128_addr,
  input  word_t            r128_rdata,
  output logic             r128_we,
  output word_t            r128_wdata,
  // ALU, long mode
  output word_t            alu_la,
  output word_t            alu_lb,
  output logic [7:0]       alu_ld,
  output logic             alu_neg,
  output logic             alu_first,
  output carry_t           alu_cinit,
  output logic             alu_en,
  input  word_t            alu_sum,
  input  carry_t           alu_cout,
  // ER
  output logic             er_load,
  output logic [1:0]       er_field,
  output logic             er_shl6,
  input  logic [5:0]       er_top6
);
  typedef enum logic [2:0] {
    S_IDLE, S_SIMPLE, S_ERLD, S_MUL, S_SRCH, S_FCMP, S_RED, S_DONE
  } state_e;

  localparam int LASTW = REG_WORDS_P - 1;
  localparam int SURE  = (REG_WORDS_P > 1) ? 127 : 0;

  state_e           st;
  seq_cmd_e         cmd_q;
  logic [3:0]       ra_q, rb_q, rc_q;
  logic [WAW-1:0]   w_q;
  logic [LEN_W-1:0] f_q;          // current 24-bit field of Ra
  logic [1:0]       j_q;          // digit within the field
  logic [2:0]       bit_q;        // binary search bit
  logic [M_W-1:0]   m_q, t_q;
  logic signed [9:0] g_q;         // guard: bits of R8 above the top word
  logic [5:0]       prev6_q;
  logic             first_q;
  logic             last_w;
  logic [M_W-1:0]   trial;
  logic signed [12:0] dhi;

  function automatic logic [AW128-1:0] radr(input logic [3:0] r, input logic [WAW-1:0] w);
    return AW128'(r * REG_WORDS_P + w);
  endfunction

  assign last_w = (w_q == WAW'(LASTW));
  assign trial  = m_q | (M_W'(1) << bit_q);
  assign dhi    = 13'(g_q) + 13'(alu_cout);
  assign busy   = (st != S_IDLE);
  assign state_code = {1'b0, cmd_q, 1'b0, st};

  // datapath control
  always_comb begin
    r8_addr    = w_q;
    r8_we      = 1'b0;
    r8_wdata   = alu_sum;
    r128_addr  = radr(ra_q, w_q);
    r128_we    = 1'b0;
    r128_wdata = alu_sum;
    alu_la     = '0;
    alu_lb     = r128_rdata;
    alu_ld     = 8'd1;
    alu_neg    = 1'b0;
    alu_first  = (w_q == '0);
    alu_cinit  = '0;
    alu_en     = 1'b0;
    er_load    = 1'b0;
    er_field   = f_q[1:0];
    er_shl6    = 1'b0;
    done       = (st == S_DONE);
    unique case (st)
      S_SIMPLE: begin
        alu_en = 1'b1;
        unique case (cmd_q)
          SEQ_LOAD8:  begin r8_we = 1'b1; end
          SEQ_STORE8: begin alu_la = r8_rdata; alu_ld = 8'd0; r128_we = 1'b1; end
          SEQ_ADD:    begin alu_la = r8_rdata; r8_we = 1'b1; end
          SEQ_SUB:    begin alu_la = r8_rdata; alu_neg = 1'b1; r8_we = 1'b1; end
          SEQ_NEG:    begin alu_neg = 1'b1; r8_we = 1'b1; end
          SEQ_MULD:   begin alu_la = r8_rdata; alu_ld = digit8; r8_we = 1'b1; end
          default:    ;
        endcase
      end
      S_ERLD: begin
        r128_addr = radr(ra_q, WAW'(f_q >> 2));
        er_load   = 1'b1;
      end
      S_MUL: begin
        r128_addr = radr(rb_q, w_q);
        alu_la    = first_q ? '0 : {r8_rdata[WORD_W-7:0], (w_q == '0) ? 6'd0 : prev6_q};
        alu_ld    = {2'b00, er_top6};
        alu_en    = 1'b1;
        r8_we     = 1'b1;
      end
      S_SRCH: begin
        r8_addr   = WAW'(LASTW);
        r128_addr = radr(rc_q, WAW'(LASTW));
        alu_la    = r8_rdata;
        alu_ld    = 8'(trial);
        alu_neg   = 1'b1;
        alu_first = 1'b1;
      end
      S_FCMP: begin
        r128_addr = radr(rc_q, w_q);
        alu_la    = r8_rdata;
        alu_ld    = 8'(t_q);
        alu_neg   = 1'b1;
        alu_en    = 1'b1;
      end
      S_RED: begin
        r128_addr = radr(rc_q, w_q);
        alu_la    = r8_rdata;
        alu_ld    = 8'(m_q);
        alu_neg   = 1'b1;
        alu_en    = 1'b1;
        r8_we     = 1'b1;
        er_shl6   = last_w;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd_q <= SEQ_LOAD8;
      ra_q <= '0; rb_q <= '0; rc_q <= '0;
      w_q <= '0; f_q <= '0; j_q <= '0; bit_q <= '0;
      m_q <= '0; t_q <= '0; g_q <= '0; prev6_q <= '0; first_q <= 1'b0;
      carry_out <= '0; ev_fullcmp <= 1'b0;
    end else begin
      ev_fullcmp <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          cmd_q <= cmd; ra_q <= ra; rb_q <= rb; rc_q <= rc; w_q <= '0;
          if (cmd == SEQ_MODMUL) begin
            f_q     <= (len == '0) ? '0 : len - 1'b1;
            j_q     <= '0;
            first_q <= 1'b1;
            st      <= S_ERLD;
          end else begin
            st <= S_SIMPLE;
          end
        end
        S_SIMPLE: begin
          w_q <= w_q + 1'b1;
          if (last_w) begin
            carry_out <= alu_cout;
            w_q <= '0;
            st  <= S_DONE;
          end
        end
        S_ERLD: begin
          w_q <= '0;
          st  <= S_MUL;
        end
        S_MUL: begin
          prev6_q <= r8_rdata[WORD_W-1 -: 6];
          w_q     <= w_q + 1'b1;
          if (last_w) begin
            g_q   <= (first_q ? 10'sd0 : 10'(r8_rdata[WORD_W-1 -: 6])) + 10'(alu_cout);
            w_q   <= '0;
            m_q   <= '0;
            bit_q <= 3'(M_W - 1);
            st    <= S_SRCH;
          end
        end
        S_SRCH: begin
          if (dhi >= 0 && (dhi > 0 || alu_sum >= WORD_W'(SURE))) begin
            m_q <= trial;                       // surely R8 - t*Rc >= 0
            if (bit_q == '0) st <= S_RED; else bit_q <= bit_q - 1'b1;
          end else if (dhi < 0) begin
            if (bit_q == '0) st <= S_RED; else bit_q <= bit_q - 1'b1;
          end else begin
            t_q        <= trial;                // almost equal: full compare
            w_q        <= '0;
            ev_fullcmp <= 1'b1;
            st         <= S_FCMP;
          end
        end
        S_FCMP: begin
          w_q <= w_q + 1'b1;
          if (last_w) begin
            w_q <= '0;
            if (13'(g_q) + 13'(alu_cout) >= 0) m_q <= t_q;
            if (bit_q == '0) st <= S_RED;
            else begin bit_q <= bit_q - 1'b1; st <= S_SRCH; end
          end
        end
        S_RED: begin
          w_q <= w_q + 1'b1;
          if (last_w) begin
            w_q     <= '0;
            first_q <= 1'b0;
            j_q     <= j_q + 1'b1;
            if (j_q == 2'd3) begin
              if (f_q == '0) st <= S_DONE;
              else begin f_q <= f_q - 1'b1; st <= S_ERLD; end
            end else begin
              st <= S_MUL;
            end
          end
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // after the reduction the guard must be cleared: 0 <= R8 < Rc
  a_red_exact: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_RED && last_w) |-> (13'(g_q) + 13'(alu_cout) == 0));
endmodule
