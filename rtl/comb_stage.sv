// comb_stage -- one W-bit comb (differentiator) of the CIC filter.
//
// Computes y[m] = x[m] - x[m-M] modulo 2^W at the decimated rate. It is built
// from W comb cells: each bit stores its input, and the adders add the
// inverted stored word to the current one with a carry of 1 into bit 0, which
// is two's-complement subtraction. The stored word advances only on the
// decimation strobe en, so x must be held steady between strobes (the
// down-sampler does that) and M counts decimated samples.
//
// Interface: x, y are W-bit two's-complement words. Timing: y is combinational
// in x and the stored word; the stored word loads x at a rising edge with en.
module comb_stage #(
  parameter int unsigned W = cic_pkg::CIC_BOUT,
  parameter int unsigned M = cic_pkg::CIC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic carry [W+1];  // carry[i] enters bit i

  assign carry[0] = 1'b1;  // completes the two's complement of the delayed word

  for (genvar i = 0; i < W; i++) begin : g_bit
    comb_cell #(.M(M)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .a     (x[i]),
      .cin   (carry[i]),
      .sum   (y[i]),
      .cout  (carry[i+1])
    );
  end

endmodule
