// tb_cic_coder -- checks the +1 / -1 mapping of the coder at the default
// width and at a narrow width.
module tb_cic_coder;
  localparam int W = 20;
  logic ds_bit;
  logic [W-1:0] x;
  logic [3:0] x4;
  int checks = 0, failures = 0;

  cic_coder dut (.ds_bit(ds_bit), .x(x));
  cic_coder #(.W(4)) dut4 (.ds_bit(ds_bit), .x(x4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      ds_bit = 1'(rep);
      #1;
      checks += 2;
      if ($signed(x) != (ds_bit ? 20'sd1 : -20'sd1)) begin
        failures++;
        $display("FAIL ds_bit=%0b x=%h", ds_bit, x);
      end
      if ($signed(x4) != (ds_bit ? 4'sd1 : -4'sd1)) begin
        failures++;
        $display("FAIL W=4 ds_bit=%0b x=%h", ds_bit, x4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
