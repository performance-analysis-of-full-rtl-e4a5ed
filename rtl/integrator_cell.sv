// integrator_cell -- one bit slice of an integrator stage.
//
// A full adder and a delay flip-flop in a feedback loop. Adder input A is this
// bit of the stage input, input B is the flip-flop output Q (the previous
// value of this bit of the running sum), and the carry comes from the bit
// below. The adder sum is both the stored next value (flip-flop D) and this
// bit of the stage output; the carry out goes to the bit above. Chaining W of
// these cells gives a W-bit accumulator y[n] = x[n] + y[n-1] with ripple carry.
// The wiring follows the integrator bit cell of the design; the reset is this
// design's addition.
//
// Timing: sum and cout are combinational in a, cin and the stored bit; the
// stored bit is updated at every rising clock edge.
module integrator_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic q, qb_unused;

  hybrid_full_adder u_fa (
    .a    (a),
    .b    (q),
    .cin  (cin),
    .sum  (sum),
    .cout (cout)
  );

  delay_ff u_ff (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .d     (sum),
    .q     (q),
    .qb    (qb_unused)
  );

endmodule
