// tb_comb_cell -- random test of one comb bit slice (M = 1 and M = 2).
// The reference keeps the last M bits loaded on enable; each cycle it expects
// {cout, sum} = a + ~delayed + cin.
module tb_comb_cell;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, a = 1'b0, cin = 1'b0;
  logic sum1, cout1, sum2, cout2;
  logic [1:0] hist;  // hist[0] = last loaded bit, hist[1] = the one before
  int checks = 0, failures = 0;

  comb_cell dut1 (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .cin(cin), .sum(sum1), .cout(cout1));
  comb_cell #(.M(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .cin(cin), .sum(sum2), .cout(cout2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic [1:0] t1, t2;
      @(negedge clk);
      a   = 1'($urandom);
      cin = 1'($urandom);
      en  = ($urandom % 3) == 0;
      #1;
      t1 = 2'(a) + {1'b0, ~hist[0]} + 2'(cin);
      t2 = 2'(a) + {1'b0, ~hist[1]} + 2'(cin);
      checks += 2;
      if ({cout1, sum1} !== t1) begin
        failures++;
        $display("FAIL M=1 cycle %0d: a=%0b d=%0b cin=%0b -> %0b%0b", i, a, hist[0], cin, cout1, sum1);
      end
      if ({cout2, sum2} !== t2) begin
        failures++;
        $display("FAIL M=2 cycle %0d: a=%0b d=%0b cin=%0b -> %0b%0b", i, a, hist[1], cin, cout2, sum2);
      end
      @(posedge clk);
      if (en) hist = {hist[0], a};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
