// pld_pkg: constants and types shared by the PLD001 cryptoprocessor RTL.
//
// The datapath works on 96-bit RAM words; a long data register is eight such
// words (768 bits). RAM8 holds one long register, RAM128 holds sixteen. The
// ALU is built from four 24-bit units. IDEA works on 16-bit subblocks with
// multiplication modulo F4 = 2^16+1. These numbers follow the document; the
// command encodings below are this design's own.
package pld_pkg;

  localparam int WORD_W    = 96;   // RAM field width L
  localparam int UNIT_W    = 24;   // width of one alu24 unit
  localparam int N_UNITS   = 4;    // alu24.1 .. alu24.4
  localparam int REG_WORDS = 8;    // words per long data register R
  localparam int N_REGS    = 16;   // long registers in RAM128
  localparam int DIGIT_W   = 6;    // modular-multiply digit (ER higher 6 bits)
  localparam int M_W       = 7;    // reduction multiple m found by binary search

  localparam logic [16:0] F4 = 17'h10001;  // Fermat's 4th number 2^16+1

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [15:0]       sub_t;   // IDEA 16-bit subblock
  typedef logic signed [11:0] carry_t; // ALU carry logic register (signed)

  // Commands executed by the ALU sequencer. R8 is the register in RAM8,
  // Rk the long register k of RAM128.
  typedef enum logic [2:0] {
    SEQ_LOAD8  = 3'd0,  // R8 := Ra
    SEQ_STORE8 = 3'd1,  // Ra := R8
    SEQ_ADD    = 3'd2,  // R8 := R8 + Ra
    SEQ_SUB    = 3'd3,  // R8 := R8 - Ra
    SEQ_NEG    = 3'd4,  // R8 := -Ra
    SEQ_MULD   = 3'd5,  // R8 := R8 + digit8 * Ra
    SEQ_MODMUL = 3'd6   // R8 := Ra * Rb mod Rc  (Ra, Rb < Rc)
  } seq_cmd_e;

  // Index calculation operations
  typedef enum logic [3:0] {
    IX_LDI  = 4'd0,  // Xi := imm
    IX_ADDI = 4'd1,  // Xi := Xi + imm
    IX_ANDI = 4'd2,  // Xi := Xi & imm
    IX_ORI  = 4'd3,  // Xi := Xi | imm
    IX_XORI = 4'd4,  // Xi := Xi ^ imm
    IX_ANDE = 4'd5,  // Xi := Xi & ER[7:0]
    IX_ORE  = 4'd6,  // Xi := Xi | ER[7:0]
    IX_XORE = 4'd7,  // Xi := Xi ^ ER[7:0]
    IX_TOER = 4'd8,  // ER[7:0] := Xi
    IX_FRER = 4'd9   // Xi := ER[7:0]
  } ix_op_e;

  // IDEA representation: the all-zero subblock stands for 2^16
  function automatic logic [16:0] idea_ext(input sub_t v);
    return (v == 16'd0) ? 17'h10000 : {1'b0, v};
  endfunction

endpackage
