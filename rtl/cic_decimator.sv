// cic_decimator -- third-order CIC decimation filter for a 1-bit
// delta-sigma stream.
//
// Signal path: the coder turns each modulator bit into +1/-1; N integrator
// stages accumulate at the sampling clock; the down-sampler keeps every R-th
// integrator output; N comb stages, advancing once per kept sample, take the
// differences x[m] - x[m-M]. The transfer function is
// H(z) = ((1 - z^-RM) / (1 - z^-1))^N, with DC gain (R*M)^N = 2^18 for the
// default N = 3, R = 64, M = 1. Every stage is W = 20 bits wide, the output
// word size of the design (N*log2(RM) + 1 input bit + 1 sign bit); the
// integrators wrap modulo 2^W and the combs undo the wrap exactly. Each stage
// is a ripple chain of bit cells, each cell one full adder and one delay
// flip-flop, so the 1-bit slice of the whole filter is 2N adders and 2N
// flip-flops. Structure, sizes and bit cells follow the design; the single
// clock with a decimation enable (instead of a divided clock), the reset and
// the decimation phase are this design's choices.
//
// Interface: clk is the sampling clock fs (2.56 MHz at the design point), one
// ds_bit per rising edge. dout is a two's-complement word that changes once
// every R clocks (40 kHz); dout_valid is high in the first clock in which a
// new dout is present. The output for the sample window ending with input bit
// n (n = R*k + R - 1, counted from reset) appears one clock after that bit is
// taken.
module cic_decimator #(
  parameter int unsigned N = cic_pkg::CIC_N,
  parameter int unsigned R = cic_pkg::CIC_R,
  parameter int unsigned M = cic_pkg::CIC_M,
  parameter int unsigned W = cic_pkg::cic_bout(N, R, M, cic_pkg::CIC_BIN)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ds_bit,
  output logic [W-1:0] dout,
  output logic         dout_valid
);

  logic [W-1:0] integ [N+1];  // integ[0] = coder output, integ[k] = stage k output
  logic [W-1:0] comb  [N+1];  // comb[0] = decimated sample, comb[k] = comb stage k output
  logic         strobe;

  cic_coder #(.W(W)) u_coder (
    .ds_bit (ds_bit),
    .x      (integ[0])
  );

  for (genvar k = 0; k < N; k++) begin : g_integ
    integrator_stage #(.W(W)) u_integ (
      .clk   (clk),
      .rst_n (rst_n),
      .x     (integ[k]),
      .y     (integ[k+1])
    );
  end

  downsampler #(.W(W), .R(R)) u_down (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (integ[N]),
    .y      (comb[0]),
    .strobe (strobe),
    .valid  (dout_valid)
  );

  for (genvar k = 0; k < N; k++) begin : g_comb
    comb_stage #(.W(W), .M(M)) u_comb (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (strobe),
      .x     (comb[k]),
      .y     (comb[k+1])
    );
  end

  assign dout = comb[N];

endmodule
