// sdm1_model -- behavioural model of a first-order delta-sigma modulator.
// Not synthesizable; testbench use only. The analog input vin (real, in the
// range -1..+1 of full scale) is integrated together with the fed-back
// output level (+1 for a 1, -1 for a 0); the output bit is the sign of the
// integrator, updated at each rising clock edge. A first-order loop is used
// because a third-order CIC filter must be at least one order above its
// modulator. Reset clears the integrator and sets the bit to 1.
module sdm1_model (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output logic bit_out
);
  real integ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= 0.0;
      bit_out <= 1'b1;
    end else begin
      integ   <= integ + vin - (bit_out ? 1.0 : -1.0);
      bit_out <= (integ + vin - (bit_out ? 1.0 : -1.0)) >= 0.0;
    end
  end
endmodule
