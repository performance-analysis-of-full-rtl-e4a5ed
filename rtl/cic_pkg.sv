// cic_pkg -- constants shared by the CIC decimation filter.
//
// The filter is a third-order cascaded integrator-comb decimator for the
// 1-bit output of a delta-sigma modulator. The numbers below are its design
// point: order N = 3, decimation factor R = 64, differential delay M = 1,
// 1-bit input, sampling clock 2.56 MHz (output rate 40 kHz). The word width
// follows the usual CIC growth rule B_out = N*log2(R*M) + B_in + 1 sign bit,
// which gives 20 bits here. All stages of the filter use this full width.
package cic_pkg;

  localparam int unsigned CIC_N     = 3;          // filter order
  localparam int unsigned CIC_R     = 64;         // decimation factor
  localparam int unsigned CIC_M     = 1;          // differential delay of the combs
  localparam int unsigned CIC_BIN   = 1;          // modulator output width
  localparam int unsigned CIC_FS_HZ = 2_560_000;  // sampling clock

  // Output word width: N*log2(R*M) + B_in + 1 sign bit.
  function automatic int unsigned cic_bout(int unsigned n, int unsigned r,
                                           int unsigned m, int unsigned bin);
    return n * $clog2(r * m) + bin + 1;
  endfunction

  localparam int unsigned CIC_BOUT = cic_bout(CIC_N, CIC_R, CIC_M, CIC_BIN);

endpackage
