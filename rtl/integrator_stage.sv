// integrator_stage -- one W-bit integrator of the CIC filter.
//
// Computes y[n] = x[n] + y[n-1] modulo 2^W at the sampling rate. It is built
// exactly as the bit-sliced structure of the design: W integrator cells (full
// adder plus delay flip-flop) whose carries ripple from the least significant
// bit upward. The carry into bit 0 is 0. The output is the adder result, so it
// already includes the current input; the registers hold y[n-1]. Overflow
// simply wraps; the comb stages downstream remove the wrap.
//
// Interface: x, y are W-bit two's-complement words. Timing: y is combinational
// in x and the state; the state updates at every rising clock edge.
module integrator_stage #(
  parameter int unsigned W = cic_pkg::CIC_BOUT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic carry [W+1];  // carry[i] enters bit i

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    integrator_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (x[i]),
      .cin   (carry[i]),
      .sum   (y[i]),
      .cout  (carry[i+1])
    );
  end

endmodule
