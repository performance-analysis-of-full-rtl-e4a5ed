// tb_cic_decimator -- end-to-end test of the CIC decimator at its default
// size (N = 3, R = 64, M = 1, 20-bit words).
//
// The reference does not use the integrator/comb recursion: it convolves the
// +1/-1 input sequence with the filter's impulse response, the N-fold
// convolution of a length-R*M box, and decimates. Every output word is
// compared exactly, including the start-up transient (zero state equals zero
// input before reset). dout_valid must appear once every R clocks, one clock
// after the last input bit of each window. The stimulus has four phases:
// random bits, a run of ones (positive full scale, 2^18), a run of zeros
// (negative full scale) and a biased random stream. The test also counts
// mechanisms that must happen: both coder codes, full-scale outputs of both
// signs, and wrap-around of the last integrator beyond the 20-bit range.
module tb_cic_decimator;
  import cic_pkg::*;

  localparam int N  = CIC_N;
  localparam int R  = CIC_R;
  localparam int M  = CIC_M;
  localparam int W  = CIC_BOUT;
  localparam int L  = N * (R * M - 1) + 1;   // impulse response length
  localparam int NOUT = 100;                 // output words checked
  localparam int T  = NOUT * R + 1;          // input clocks driven

  logic clk = 1'b0, rst_n = 1'b0, ds_bit = 1'b0;
  logic [W-1:0] dout;
  logic dout_valid;
  logic [W-1:0] last_dout;

  cic_decimator dut (.clk(clk), .rst_n(rst_n), .ds_bit(ds_bit), .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out = 0, n_plus = 0, n_minus = 0, n_fs_pos = 0, n_fs_neg = 0, n_wrap = 0;
  longint h [L];
  int     xs [T];

  initial begin : watchdog
    repeat (T + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Impulse response: coefficients of (1 + z^-1 + ... + z^-(RM-1))^N.
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

  initial begin
    longint i1, i2, i3;   // unbounded integrator values, to detect wraps
    longint lim;
    make_h();
    lim = longint'(1) << (W - 1);
    // stimulus
    for (int t = 0; t < T; t++) begin
      bit b;
      case (t / (R * 25))
        0:       b = 1'($urandom);
        1:       b = 1'b1;
        2:       b = 1'b0;
        default: b = ($urandom % 5) != 0;
      endcase
      xs[t] = b ? 1 : -1;
    end
    i1 = 0; i2 = 0; i3 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      bit exp_valid;
      @(negedge clk);
      // outputs of the previous clock's sample
      exp_valid = (t > 0) && ((t - 1) % R == R - 1);
      checks++;
      if (dout_valid !== exp_valid) begin
        failures++;
        $display("FAIL t=%0d dout_valid=%0b expected %0b", t, dout_valid, exp_valid);
      end
      // between updates the output word must hold its value
      if (!exp_valid && n_out > 0) begin
        checks++;
        if (dout !== last_dout) begin
          failures++;
          $display("FAIL t=%0d dout changed between updates: %0d -> %0d", t, $signed(last_dout), $signed(dout));
        end
      end
      last_dout = dout;
      if (exp_valid) begin
        longint e;
        e = ref_out(t - 1);
        checks++;
        n_out++;
        if (longint'($signed(dout)) != e) begin
          failures++;
          $display("FAIL output %0d: dout=%0d expected %0d", n_out - 1, $signed(dout), e);
        end
        if (e == (longint'(R * M) ** N))  n_fs_pos++;
        if (e == -(longint'(R * M) ** N)) n_fs_neg++;
      end
      ds_bit = (xs[t] > 0);
      if (ds_bit) n_plus++; else n_minus++;
      i1 += xs[t]; i2 += i1; i3 += i2;
      if (i3 >= lim || i3 < -lim) n_wrap++;
    end
    checks++;
    if (n_out != NOUT) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, NOUT); end
    checks++;
    if (n_plus == 0 || n_minus == 0) begin failures++; $display("FAIL coder code not exercised"); end
    checks++;
    if (n_fs_pos == 0 || n_fs_neg == 0) begin failures++; $display("FAIL full-scale output not reached"); end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL integrator wrap-around not exercised"); end
    $display("mechanisms: outputs=%0d coder(+1)=%0d coder(-1)=%0d fullscale(+)=%0d fullscale(-)=%0d integrator_wrap_clocks=%0d",
             n_out, n_plus, n_minus, n_fs_pos, n_fs_neg, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
