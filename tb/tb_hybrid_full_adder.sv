// tb_hybrid_full_adder -- exhaustive check of the hybrid full adder.
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic sum a + b + cin computed in the testbench.
module tb_hybrid_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  hybrid_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 8; v++) begin
        int total;
        {a, b, cin} = 3'(v);
        #1;
        total = int'(a) + int'(b) + int'(cin);
        checks++;
        if ({cout, sum} != 2'(total)) begin
          failures++;
          $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b, expected %0d", a, b, cin, cout, sum, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
