// pld_alu: the shared ALU of PLD001, four alu24 units in one of two set-ups.
//
// IDEA multiply mode (idea_mode=1, Fig. 3, Table 1). Units alu24.1+alu24.3 form
// multiplier pair 0 and alu24.2+alu24.4 pair 1. A modular multiplication
// modulo F4 = 2^16+1 takes two cycles with the low-high algorithm:
//   * multiply cycle (i_mul=1): alu24.1 forms A(7:0)*B, alu24.3 adds
//     A(15:8)*B*2^8 to it; the 33-bit product is latched in T1 and T2 (pair 0)
//     and T3 and T4 (pair 1). The all-zero subblock stands for 2^16: B is
//     widened to 17 bits and for A=0 the term 2^16*B is added in alu24.3.
//   * reduce cycle (i_mul=0): alu24.1 computes T.lo-T.hi and alu24.3
//     T.lo-T.hi+F4; the sign of alu24.1 selects the result (ir0). Pair 1 does
//     the same for its own product (ir1), or, with iadd_en, adds the 16-bit
//     iadd as well (rows 4 and 6 of Table 1); then the sign of alu24.1 selects,
//     so both pairs must have been given the same operands.
//   Results are taken modulo 2^16, so 2^16 comes out as 0.
//
// Long modular mode (idea_mode=0, Fig. 4): an 8x96 multiplier with a 96-bit
// adder and negator and a carry logic register. Per cycle it computes
//   full = la + (lneg ? -(ld*lb) : ld*lb) + cin,  lsum = full mod 2^96,
//   lcout = full >>> 96 (signed), cin = l_first ? l_cinit : carry register.
// With l_en the carry register takes lcout, so long numbers are processed one
// 96-bit word per cycle, least significant first. Add is ld=1, subtract ld=1
// with lneg, transfer ld=0. The carry chain between the four units is
// combinational.
//
// The operand set-ups follow Fig. 3 and Table 1; the signed carry
// representation and the handling of the zero subblock are this design's.
module pld_alu
  import pld_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        idea_mode,
  // IDEA mode
  input  logic        i_mul,
  input  sub_t        ia0, ib0, ia1, ib1,
  input  sub_t        iadd,
  input  logic        iadd_en,
  output sub_t        ir0, ir1,
  // long mode
  input  word_t       la, lb,
  input  logic [7:0]  ld,
  input  logic        lneg,
  input  logic        l_first,
  input  carry_t      l_cinit,
  input  logic        l_en,
  output word_t       lsum,
  output carry_t      lcout,
  output carry_t      lcarry_q
);
  logic signed [35:0] t_q [N_UNITS];   // T1..T4 of Table 1
  carry_t             carry_q;
  logic [16:0]        bz0, bz1;
  logic signed [35:0] add_v;
  carry_t             cin;

  // unit outputs: s1 = alu24.1, s2 = alu24.2, s3 = alu24.3, s4 = alu24.4
  logic signed [35:0] s1, s2, s3, s4;

  function automatic logic signed [35:0] lo_of(input logic signed [35:0] t);
    logic signed [35:0] r;
    r = 36'(t[15:0]);
    return r;
  endfunction
  function automatic logic signed [35:0] neg_hi_of(input logic signed [35:0] t);
    return -$signed(36'(t[33:16]));
  endfunction

  assign bz0   = idea_ext(ib0);
  assign bz1   = idea_ext(ib1);
  assign add_v = iadd_en ? 36'(iadd) : 36'sd0;
  assign cin   = l_first ? l_cinit : carry_q;

  // Operand set-up of one unit. slice: which 24-bit slice of the 96-bit word
  // the unit handles in long mode; prev: the unit below it in the carry chain
  // (long mode) or its partner in a 16x16 multiplier (IDEA multiply cycle).
  typedef struct packed {
    logic [7:0]         a;
    logic [23:0]        b;
    logic               sh8;
    logic               neg;
    logic signed [35:0] x, y, z;
  } uin_t;

  uin_t in1, in2, in3, in4;

  // alu24.1: pair 0 low half / long slice 0
  always_comb begin
    in1 = '0;
    if (idea_mode && i_mul) begin
      in1.a = ia0[7:0]; in1.b = 24'(bz0);
    end else if (idea_mode) begin
      in1.x = lo_of(t_q[0]); in1.y = neg_hi_of(t_q[0]);
    end else begin
      in1.a = ld; in1.b = lb[0 +: UNIT_W]; in1.neg = lneg;
      in1.x = 36'(la[0 +: UNIT_W]); in1.y = 36'(cin);
    end
  end
  // alu24.2: pair 1 low half / long slice 1
  always_comb begin
    in2 = '0;
    if (idea_mode && i_mul) begin
      in2.a = ia1[7:0]; in2.b = 24'(bz1);
    end else if (idea_mode) begin
      in2.x = lo_of(t_q[1]); in2.y = neg_hi_of(t_q[1]); in2.z = add_v;
    end else begin
      in2.a = ld; in2.b = lb[UNIT_W +: UNIT_W]; in2.neg = lneg;
      in2.x = 36'(la[UNIT_W +: UNIT_W]); in2.y = s1 >>> UNIT_W;
    end
  end
  // alu24.3: pair 0 high half / long slice 2
  always_comb begin
    in3 = '0;
    if (idea_mode && i_mul) begin
      in3.a = ia0[15:8]; in3.b = 24'(bz0); in3.sh8 = 1'b1; in3.x = s1;
      in3.y = (ia0 == 16'd0) ? (36'(bz0) << 16) : 36'sd0;
    end else if (idea_mode) begin
      in3.x = lo_of(t_q[2]); in3.y = neg_hi_of(t_q[2]); in3.z = 36'(F4);
    end else begin
      in3.a = ld; in3.b = lb[2*UNIT_W +: UNIT_W]; in3.neg = lneg;
      in3.x = 36'(la[2*UNIT_W +: UNIT_W]); in3.y = s2 >>> UNIT_W;
    end
  end
  // alu24.4: pair 1 high half / long slice 3
  always_comb begin
    in4 = '0;
    if (idea_mode && i_mul) begin
      in4.a = ia1[15:8]; in4.b = 24'(bz1); in4.sh8 = 1'b1; in4.x = s2;
      in4.y = (ia1 == 16'd0) ? (36'(bz1) << 16) : 36'sd0;
    end else if (idea_mode) begin
      in4.x = lo_of(t_q[3]); in4.y = neg_hi_of(t_q[3]); in4.z = 36'(F4) + add_v;
    end else begin
      in4.a = ld; in4.b = lb[3*UNIT_W +: UNIT_W]; in4.neg = lneg;
      in4.x = 36'(la[3*UNIT_W +: UNIT_W]); in4.y = s3 >>> UNIT_W;
    end
  end

  alu24 u_alu24_1 (.a(in1.a), .b(in1.b), .sh8(in1.sh8), .neg(in1.neg),
                   .x(in1.x), .y(in1.y), .z(in1.z), .s(s1));
  alu24 u_alu24_2 (.a(in2.a), .b(in2.b), .sh8(in2.sh8), .neg(in2.neg),
                   .x(in2.x), .y(in2.y), .z(in2.z), .s(s2));
  alu24 u_alu24_3 (.a(in3.a), .b(in3.b), .sh8(in3.sh8), .neg(in3.neg),
                   .x(in3.x), .y(in3.y), .z(in3.z), .s(s3));
  alu24 u_alu24_4 (.a(in4.a), .b(in4.b), .sh8(in4.sh8), .neg(in4.neg),
                   .x(in4.x), .y(in4.y), .z(in4.z), .s(s4));

  assign ir0 = (s1 >= 0) ? s1[15:0] : s3[15:0];
  assign ir1 = ((iadd_en ? s1 : s2) >= 0) ? s2[15:0] : s4[15:0];
  assign lsum  = {s4[UNIT_W-1:0], s3[UNIT_W-1:0], s2[UNIT_W-1:0], s1[UNIT_W-1:0]};
  assign lcout = carry_t'(s4 >>> UNIT_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_UNITS; k++) t_q[k] <= '0;
      carry_q <= '0;
    end else begin
      if (idea_mode && i_mul) begin
        t_q[0] <= s3;  t_q[2] <= s3;   // pair 0 product into T1 (alu24.1), T2 (alu24.3)
        t_q[1] <= s4;  t_q[3] <= s4;   // pair 1 product into T3 (alu24.2), T4 (alu24.4)
      end
      if (!idea_mode && l_en) carry_q <= lcout;
    end
  end

  assign lcarry_q = carry_q;
endmodule
