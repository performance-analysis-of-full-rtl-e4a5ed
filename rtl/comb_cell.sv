// comb_cell -- one bit slice of a comb (differentiator) stage.
//
// The stage input bit drives both adder input A and the delay flip-flop. The
// inverted output QB of the delay drives adder input B, so the adder forms
// a + ~a_delayed + cin. Chained over W bits with a carry of 1 into the least
// significant bit, this is the two's-complement difference
// y[m] = x[m] - x[m-M]. The wiring (A to D, QB to B, carry between bit slices)
// follows the comb bit cell of the design. For a differential delay M above 1
// the single flip-flop becomes a chain of M flip-flops. The delay advances only
// when en is high: en is the one-in-R decimation strobe, so the delay counts
// output samples, not input clocks.
//
// Timing: sum and cout are combinational in a, cin and the delayed bit.
module comb_cell #(
  parameter int unsigned M = 1  // differential delay, in decimated samples
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic a,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic [M:0] tap;   // tap[0] = a, tap[k] = a delayed by k strobes
  logic [M:1] tap_n; // inverted outputs of the delay flip-flops

  assign tap[0] = a;

  for (genvar k = 1; k <= M; k++) begin : g_delay
    delay_ff u_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d     (tap[k-1]),
      .q     (tap[k]),
      .qb    (tap_n[k])
    );
  end

  hybrid_full_adder u_fa (
    .a    (a),
    .b    (tap_n[M]),
    .cin  (cin),
    .sum  (sum),
    .cout (cout)
  );

endmodule
