// tb_integrator_stage -- random test of a 20-bit integrator.
// The reference accumulator acc is kept modulo 2^20; before each edge the
// output must equal acc + x, after the edge acc takes that value. Inputs are
// mostly large random words so that the carry chain and the wrap-around are
// exercised; wraps are counted and must occur.
module tb_integrator_stage;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x = '0, y, acc;
  int checks = 0, failures = 0, wraps = 0;

  integrator_stage dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [W:0] full;
      @(negedge clk);
      x = (i % 4 == 0) ? W'(($urandom % 3) - 1) : W'($urandom);
      #1;
      full = {1'b0, acc} + {1'b0, x};
      if (full[W]) wraps++;
      checks++;
      if (y !== full[W-1:0]) begin
        failures++;
        $display("FAIL cycle %0d: acc=%h x=%h y=%h", i, acc, x, y);
      end
      @(posedge clk);
      acc = full[W-1:0];
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no carry out of the top bit was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
