// cic_check_harness -- drives one cic_decimator of a given size with a
// random bit stream followed by runs of ones and zeros, and compares every
// output word with the decimated convolution of the +1/-1 input with the
// impulse response ((1 - z^-RM) / (1 - z^-1))^N. It also checks that
// dout_valid comes once every R clocks and that dout holds between updates.
// Used by tb_cic_decimator_params; reports its counts on its ports.
module cic_check_harness #(
  parameter int N = 3,
  parameter int R = 64,
  parameter int M = 1,
  parameter int NOUT = 60
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int W = cic_pkg::cic_bout(N, R, M, 1);
  localparam int L = N * (R * M - 1) + 1;
  localparam int T = NOUT * R + 1;

  logic rst_n = 1'b0, ds_bit = 1'b0, dout_valid;
  logic [W-1:0] dout, last_dout;
  longint h [L];
  int     xs [T];

  cic_decimator #(.N(N), .R(R), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .ds_bit(ds_bit), .dout(dout), .dout_valid(dout_valid));

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
    int n_out = 0, n_fs = 0;
    checks = 0; failures = 0; done = 1'b0;
    make_h();
    for (int t = 0; t < T; t++) begin
      case ((3 * t) / T)
        0:       xs[t] = ($urandom % 2) ? 1 : -1;
        1:       xs[t] = 1;
        default: xs[t] = -1;
      endcase
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      bit exp_valid;
      @(negedge clk);
      exp_valid = (t > 0) && ((t - 1) % R == R - 1);
      checks++;
      if (dout_valid !== exp_valid) begin
        failures++;
        $display("FAIL N=%0d R=%0d M=%0d t=%0d dout_valid=%0b", N, R, M, t, dout_valid);
      end
      if (!exp_valid && n_out > 0) begin
        checks++;
        if (dout !== last_dout) begin
          failures++;
          $display("FAIL N=%0d R=%0d M=%0d t=%0d dout changed between updates", N, R, M, t);
        end
      end
      last_dout = dout;
      if (exp_valid) begin
        longint e;
        e = ref_out(t - 1);
        checks++;
        if (longint'($signed(dout)) != e) begin
          failures++;
          $display("FAIL N=%0d R=%0d M=%0d output %0d: dout=%0d expected %0d", N, R, M, n_out, $signed(dout), e);
        end
        if (e == longint'(R * M) ** N || e == -(longint'(R * M) ** N)) n_fs++;
        n_out++;
      end
      ds_bit = xs[t] > 0;
    end
    checks++;
    if (n_fs == 0) begin failures++; $display("FAIL N=%0d R=%0d M=%0d full scale never reached", N, R, M); end
    done = 1'b1;
  end
endmodule
