// selftest: state-hashing self-test of PLD001 (Sec. 7.5).
//
// The state codes of the controllers (N_AN of them, 8 bits each) are fed,
// on every cycle with step high, into N_AN 8-bit signature analysers that
// run in parallel. After 255 such states the analysers are copied out and
// cleared, and the copies are shifted one byte per cycle into a 32-bit
// signature analyser, analyser 0 first. sig is that 32-bit signature;
// sig_upd pulses after each complete byte group has been absorbed.
// A tampered or faulty controller produces a different sequence of states
// and hence a different signature.
//
// Analysers are multiple-input shift registers (MISRs):
//   8 bit : s' = (s << 1) ^ (s[7] ? 8'h1D : 0) ^ in      (x^8+x^4+x^3+x^2+1)
//   32 bit: g' = (g << 1) ^ (g[31] ? 32'h04C11DB7 : 0) ^ {24'b0, byte}
// The analyser widths, their number running in parallel and the 255-state
// period are the document's; the polynomials are this design's choice.
// Reset clears everything (synchronous clear with clr as well).
module selftest #(
  parameter int N_AN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        step,
  input  logic [7:0]  state [N_AN],
  output logic [31:0] sig,
  output logic        sig_upd
);
  localparam int CW = $clog2(N_AN + 1);
  localparam int IW = (N_AN > 1) ? $clog2(N_AN) : 1;

  logic [7:0]    an_q   [N_AN];
  logic [7:0]    an_nx  [N_AN];
  logic [7:0]    snap_q [N_AN];
  logic [7:0]    cnt_q;
  logic [CW-1:0] sh_q;      // bytes still to shift into the 32-bit analyser
  logic [IW-1:0] idx_q;     // byte being shifted

  always_comb
    for (int i = 0; i < N_AN; i++)
      an_nx[i] = {an_q[i][6:0], 1'b0} ^ (an_q[i][7] ? 8'h1D : 8'h00) ^ state[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_AN; i++) begin an_q[i] <= '0; snap_q[i] <= '0; end
      cnt_q <= '0; sh_q <= '0; idx_q <= '0; sig <= '0; sig_upd <= 1'b0;
    end else if (clr) begin
      for (int i = 0; i < N_AN; i++) begin an_q[i] <= '0; snap_q[i] <= '0; end
      cnt_q <= '0; sh_q <= '0; idx_q <= '0; sig <= '0; sig_upd <= 1'b0;
    end else begin
      sig_upd <= 1'b0;
      if (step) begin
        if (cnt_q == 8'd254) begin
          for (int i = 0; i < N_AN; i++) begin snap_q[i] <= an_nx[i]; an_q[i] <= '0; end
          cnt_q <= '0;
          sh_q  <= CW'(N_AN);
          idx_q <= '0;
        end else begin
          for (int i = 0; i < N_AN; i++) an_q[i] <= an_nx[i];
          cnt_q <= cnt_q + 1'b1;
        end
      end
      if (sh_q != '0) begin
        sig   <= {sig[30:0], 1'b0} ^ (sig[31] ? 32'h04C11DB7 : 32'h0) ^ {24'h0, snap_q[idx_q]};
        idx_q <= idx_q + 1'b1;
        sh_q  <= sh_q - 1'b1;
        sig_upd <= (sh_q == CW'(1));
      end
    end
  end
endmodule
