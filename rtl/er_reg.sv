// er_reg: the 24-bit ER register of PLD001 with its two multiplexers (Fig. 5).
//
// ER is the source of the multiplicand digit for multiply and modular
// reduction. The input mux loads one of the four 24-bit fields of a 96-bit
// RAM128 word (load, field). The output mux hands the ALU either a 6-bit digit
// or an 8-bit digit ("8/6" in Fig. 5): the 6-bit digit j is ER[6j+5:6j],
// the 8-bit digit j is ER[8j+7:8j] (j=3 gives 0 for the 8-bit case).
// shl6 shifts ER left by 6 bits, moving the next lower digit to the top
// (MODMUL step 4); the modular multiply reads the top digit, j=3. wr_lo writes
// ER[7:0] from the index calculation unit. Priority: load, shl6, wr_lo.
//
// Synchronous register, asynchronous active-low reset to 0. The field and
// digit numbering is this design's choice; the document gives the widths.
module er_reg
  import pld_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [1:0]  field,
  input  word_t       word,
  input  logic        shl6,
  input  logic        wr_lo,
  input  logic [7:0]  lo_data,
  input  logic [1:0]  digit_sel,
  input  logic        sel8,
  output logic [23:0] er,
  output logic [7:0]  digit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     er <= '0;
    else if (load)  er <= word[24*field +: 24];
    else if (shl6)  er <= {er[17:0], 6'd0};
    else if (wr_lo) er[7:0] <= lo_data;
  end

  always_comb begin
    if (sel8) digit = (digit_sel == 2'd3) ? 8'd0 : er[8*digit_sel +: 8];
    else      digit = {2'b00, er[6*digit_sel +: 6]};
  end
endmodule
