// tb_cic_decimator_params -- the decimator at sizes other than its default:
// differential delay M = 2, a second-order and a fourth-order filter, and
// other decimation factors. The output width of each follows
// N*log2(R*M) + 2. Each size runs in its own checking harness.
module tb_cic_decimator_params;
  logic clk = 1'b0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  always #5 clk = ~clk;

  cic_check_harness #(.N(3), .R(16), .M(2)) h0 (.clk(clk), .checks(c0), .failures(f0), .done(d0));
  cic_check_harness #(.N(2), .R(8),  .M(1)) h1 (.clk(clk), .checks(c1), .failures(f1), .done(d1));
  cic_check_harness #(.N(4), .R(32), .M(2)) h2 (.clk(clk), .checks(c2), .failures(f2), .done(d2));

  initial begin : watchdog
    repeat (60 * 64 + 1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    #1;  // let the harnesses clear their done flags first
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
