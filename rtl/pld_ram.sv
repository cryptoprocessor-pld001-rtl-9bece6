// pld_ram: data register memory of PLD001 (RAM8 and RAM128 of Fig. 5).
//
// DEPTH words of W bits with one write port and one read port. RAM8 is
// 8 x 96 (one 768-bit long register), RAM128 is 128 x 96 (sixteen long
// registers). Word w of long register k sits at address k*8+w, least
// significant word first.
//
// Timing: the write is synchronous (we, waddr, wdata sampled on the rising
// clock edge); the read is asynchronous, so a word can be read, processed by
// the ALU and written back within one cycle, as the word-serial ALU sequences
// of the document need (one 96-bit word per cycle). A read of the address
// being written returns the old contents. Sizes follow Fig. 5; the port
// structure is this design's choice.
module pld_ram #(
  parameter int DEPTH = 128,
  parameter int W     = 96,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
