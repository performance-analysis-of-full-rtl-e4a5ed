// cic_coder -- maps the modulator bit onto a two's-complement sample.
//
// The modulator delivers straight binary (0 or 1), while the filter works in
// two's complement. The coder maps 1 to +1 and 0 to -1 and sign-extends the
// result to the filter width W: bit 0 is always 1 and every higher bit is the
// inverse of the modulator bit. The bipolar +1/-1 mapping is this design's
// choice; only the need for a coder is given.
//
// Interface: ds_bit in, x (W bits) out. Purely combinational.
module cic_coder #(
  parameter int unsigned W = cic_pkg::CIC_BOUT
) (
  input  logic         ds_bit,
  output logic [W-1:0] x
);

  always_comb begin
    x      = {W{~ds_bit}};
    x[0]   = 1'b1;
  end

endmodule
