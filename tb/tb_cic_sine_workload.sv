// tb_cic_sine_workload -- the filter at its design point (fs = 2.56 MHz,
// R = 64, output 40 kHz, 20-bit words) decimating the bit stream of a
// first-order delta-sigma modulator.
//
// Three inputs are run back to back, each for 96 output words: a 2.5 kHz
// sine of amplitude 0.5, a 10 kHz sine of amplitude 0.8 (half the 20 kHz
// output bandwidth) and a DC level of -0.3. Every output word is checked
// exactly against the decimated convolution of the bit stream with the
// filter's impulse response. Independently, the output scaled by the DC gain
// (R*M)^N = 2^18 must follow the analog input, delayed by the filter's group
// delay N*(R*M-1)/2 input samples and attenuated by the filter's response at
// that frequency (sin(pi f R / fs) / (R sin(pi f / fs)))^N, to within a
// tolerance set by the modulator's quantisation noise. The largest deviation
// per input is printed.
module tb_cic_sine_workload;
  import cic_pkg::*;

  localparam int N  = CIC_N;
  localparam int R  = CIC_R;
  localparam int M  = CIC_M;
  localparam int W  = CIC_BOUT;
  localparam int L  = N * (R * M - 1) + 1;
  localparam int NSEG = 3;
  localparam int OUT_PER_SEG = 96;
  localparam int T  = NSEG * OUT_PER_SEG * R + 1;
  localparam real FS = real'(CIC_FS_HZ);
  localparam real PI = 3.14159265358979;
  localparam real TOL = 0.01;      // allowed deviation, fraction of full scale
  localparam int SETTLE = 4;       // output words skipped after each change of input

  logic clk = 1'b0, rst_n = 1'b0, ds_bit;
  logic [W-1:0] dout;
  logic dout_valid;
  real  vin;

  sdm1_model u_mod (.clk(clk), .rst_n(rst_n), .vin(vin), .bit_out(ds_bit));
  cic_decimator dut (.clk(clk), .rst_n(rst_n), .ds_bit(ds_bit), .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint h [L];
  int     xs [T];
  real    maxerr [NSEG];

  initial begin : watchdog
    repeat (T + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_h();
    longint tmp [L];
    foreach (h[i]) h[i] = (i == 0) ? 1 : 0;
    for (int s = 0; s < N; s++) begin
      foreach (tmp[i]) tmp[i] = 0;
      for (int i = 0; i < L; i++)
        for (int j = 0; j < R * M; j++)
          if (i + j < L) tmp[i + j] += h[i];
      foreach (h[i]) h[i] = tmp[i];
    end
  endfunction

  function automatic longint ref_out(int n);
    longint acc = 0;
    for (int j = 0; j < L; j++)
      if (n - j >= 0) acc += h[j] * longint'(xs[n - j]);
    return acc;
  endfunction

  // analog input of segment seg at input sample t
  // (t may be fractional; the segment is chosen by the segment index)
  function automatic real analog_at(int seg, real tt);
    case (seg)
      0:       return 0.5 * $sin(2.0 * PI * 2500.0 * tt / FS);
      1:       return 0.8 * $sin(2.0 * PI * 10000.0 * tt / FS);
      default: return -0.3;
    endcase
  endfunction

  function automatic real analog(int t);
    return analog_at(t / (OUT_PER_SEG * R), real'(t));
  endfunction

  function automatic real seg_gain(int seg);
    real f = (seg == 0) ? 2500.0 : (seg == 1) ? 10000.0 : 0.0;
    real g;
    if (f == 0.0) return 1.0;
    g = $sin(PI * f * R * M / FS) / (R * M * $sin(PI * f / FS));
    return g ** N;
  endfunction

  initial begin
    int n_out = 0;
    real gd;
    make_h();
    gd = real'(N * (R * M - 1)) / 2.0;
    foreach (maxerr[i]) maxerr[i] = 0.0;
    vin = analog(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      // ds_bit now holds the modulator decision that the next edge samples
      xs[t] = ds_bit ? 1 : -1;
      if (t > 0 && ((t - 1) % R == R - 1)) begin
        longint e;
        int n, seg;
        real y, a, err;
        n = t - 1;
        e = ref_out(n);
        checks++;
        if (longint'($signed(dout)) != e) begin
          failures++;
          $display("FAIL output %0d: dout=%0d expected %0d", n_out, $signed(dout), e);
        end
        seg = n / (OUT_PER_SEG * R);
        if (seg < NSEG && (n_out % OUT_PER_SEG) >= SETTLE) begin
          y   = real'($signed(dout)) / real'(longint'(R * M) ** N);
          a   = seg_gain(seg) * analog_at(seg, real'(n) - gd);
          err = (y > a) ? y - a : a - y;
          if (err > maxerr[seg]) maxerr[seg] = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("FAIL output %0d: %f, input %f", n_out, y, a);
          end
        end
        n_out++;
      end
      // the next input value, seen by the modulator at the coming edge
      vin = analog(t + 1);
    end
    for (int s = 0; s < NSEG; s++)
      $display("input %0d: largest deviation from the delayed input %f of full scale", s, maxerr[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
