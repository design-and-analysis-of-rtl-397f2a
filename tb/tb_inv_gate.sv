// tb_inv_gate: self-checking test of the inverter for both input values.
module tb_inv_gate;
  logic a, y;
  int checks = 0, failures = 0;

  inv_gate dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      a = k[0];
      #1;
      checks++;
      if (y !== (k == 0)) begin
        failures++;
        $display("inv: a=%0b got y=%0b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_inv_gate
