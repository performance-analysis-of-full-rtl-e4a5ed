// tb_delay_ff -- random test of the delay flip-flop.
// Drives random data and enable, pulses reset now and then, and compares q
// and qb with a one-bit reference register after every rising edge.
module tb_delay_ff;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, d = 1'b0, q, qb;
  logic ref_q;
  int checks = 0, failures = 0;

  delay_ff dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q), .qb(qb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d  = 1'($urandom);
      en = 1'($urandom);
      if (i % 97 == 50) begin
        rst_n = 1'b0; #1; ref_q = 1'b0;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL async reset did not clear q"); end
        @(negedge clk); rst_n = 1'b1;
      end
      @(posedge clk);
      if (rst_n && en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q || qb !== ~ref_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%0b qb=%0b expected q=%0b", i, q, qb, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
