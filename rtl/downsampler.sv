// downsampler -- the rate switch between the integrator and comb sections.
//
// A counter runs from 0 to R-1 at the sampling clock. In the clock in which it
// reaches R-1, strobe is high; at the following rising edge the sample register
// takes the last integrator output and every comb delay advances (they share
// strobe as their enable). The held sample y therefore changes once every R
// clocks, which is the decimation by R. valid is high in the first clock after
// each update. The first sample is taken after the R-th input following reset.
// Counter and register are this design's simplest realisation of the switch;
// only the rate change itself is given.
//
// Interface: x (W bits, fs rate) in; y (W bits, held), strobe, valid out.
module downsampler #(
  parameter int unsigned W = cic_pkg::CIC_BOUT,
  parameter int unsigned R = cic_pkg::CIC_R
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         strobe,
  output logic         valid
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic [CW-1:0] count;

  assign strobe = (count == CW'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      y     <= '0;
      valid <= 1'b0;
    end else begin
      count <= strobe ? '0 : count + 1'b1;
      valid <= strobe;
      if (strobe) y <= x;
    end
  end

  // A new sample is taken exactly once every R clocks.
  if (R > 1) begin : g_assert
    a_strobe_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                       strobe |=> (!strobe) [* R-1]);
  end

endmodule
