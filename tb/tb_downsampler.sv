// tb_downsampler -- checks the decimation by R = 64 (default) and R = 5.
// strobe must be high exactly in clocks R-1, 2R-1, ... after reset; at each
// strobe edge y must take the input of that clock, hold it for R clocks, and
// valid must be high in the following clock only.
module tb_downsampler;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x = '0, y, y5, exp_y, exp_y5;
  logic strobe, valid, strobe5, valid5;
  logic exp_valid, exp_valid5;
  int checks = 0, failures = 0, n_strobe = 0;

  downsampler dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .strobe(strobe), .valid(valid));
  downsampler #(.R(5)) dut5 (.clk(clk), .rst_n(rst_n), .x(x), .y(y5), .strobe(strobe5), .valid(valid5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_y = '0; exp_y5 = '0; exp_valid = 1'b0; exp_valid5 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 64 * 20; t++) begin
      logic s64, s5;
      @(negedge clk);
      x = W'($urandom);
      #1;
      s64 = (t % 64) == 63;
      s5  = (t % 5) == 4;
      checks += 6;
      if (strobe !== s64)  begin failures++; $display("FAIL R=64 t=%0d strobe=%0b", t, strobe); end
      if (strobe5 !== s5)  begin failures++; $display("FAIL R=5 t=%0d strobe=%0b", t, strobe5); end
      if (y !== exp_y)     begin failures++; $display("FAIL R=64 t=%0d y=%h exp %h", t, y, exp_y); end
      if (y5 !== exp_y5)   begin failures++; $display("FAIL R=5 t=%0d y=%h exp %h", t, y5, exp_y5); end
      if (valid !== exp_valid)   begin failures++; $display("FAIL R=64 t=%0d valid=%0b", t, valid); end
      if (valid5 !== exp_valid5) begin failures++; $display("FAIL R=5 t=%0d valid=%0b", t, valid5); end
      if (s64) n_strobe++;
      @(posedge clk);
      exp_valid = s64; exp_valid5 = s5;
      if (s64) exp_y = x;
      if (s5)  exp_y5 = x;
    end
    checks++;
    if (n_strobe != 20) begin failures++; $display("FAIL %0d strobes in 1280 clocks", n_strobe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
