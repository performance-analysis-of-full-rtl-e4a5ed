// delay_ff -- the z^-1 delay element of every bit cell.
//
// A positive-edge D flip-flop with true and inverted outputs (Q and QB), as
// used in both the integrator and the comb bit cells. Two additions are this
// design's own: an asynchronous active-low reset that clears the bit to 0, so
// the filter starts from a zero state, and a clock enable. Integrator cells tie
// the enable high (they run at the sampling rate); comb cells drive it with the
// one-in-R decimation strobe, which replaces a separate divided clock.
//
// Timing: q takes d at the rising clock edge when en is high; qb = ~q.
module delay_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= d;
  end

  assign qb = ~q;

endmodule
