// tb_comb_stage -- random test of a 20-bit comb, M = 1 (default) and M = 2.
// The reference keeps the last two words loaded on enable; before each edge
// the outputs must equal x minus the word loaded M enables earlier, modulo
// 2^20.
module tb_comb_stage;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] x = '0, y1, y2, h0, h1;
  int checks = 0, failures = 0;

  comb_stage dut1 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y1));
  comb_stage #(.M(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h0 = '0; h1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x  = W'($urandom);
      en = ($urandom % 4) == 0;
      #1;
      checks += 2;
      if (y1 !== W'(x - h0)) begin
        failures++;
        $display("FAIL M=1 cycle %0d: x=%h delayed=%h y=%h", i, x, h0, y1);
      end
      if (y2 !== W'(x - h1)) begin
        failures++;
        $display("FAIL M=2 cycle %0d: x=%h delayed=%h y=%h", i, x, h1, y2);
      end
      @(posedge clk);
      if (en) begin h1 = h0; h0 = x; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
