// tb_integrator_cell -- random test of one integrator bit slice.
// The reference keeps the stored bit; each cycle it expects
// {cout, sum} = a + stored + cin before the edge and stored = sum after it.
module tb_integrator_cell;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, cin = 1'b0, sum, cout;
  logic stored;
  int checks = 0, failures = 0;

  integrator_cell dut (.clk(clk), .rst_n(rst_n), .a(a), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stored = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic [1:0] total;
      @(negedge clk);
      a   = 1'($urandom);
      cin = 1'($urandom);
      #1;
      total = 2'(a) + 2'(stored) + 2'(cin);
      checks++;
      if ({cout, sum} !== total) begin
        failures++;
        $display("FAIL cycle %0d: a=%0b stored=%0b cin=%0b -> %0b%0b", i, a, stored, cin, cout, sum);
      end
      @(posedge clk);
      stored = total[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
