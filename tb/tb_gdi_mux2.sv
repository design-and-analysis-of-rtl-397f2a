// tb_gdi_mux2: exhaustive self-checking test of the 2:1 multiplexer.
// All eight combinations of (s, in1, in2) are applied; the expected output is
// in2 when s = 1 and in1 when s = 0.
module tb_gdi_mux2;
  logic s, in1, in2, y;
  int checks = 0, failures = 0;

  gdi_mux2 dut (.s(s), .in1(in1), .in2(in2), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {s, in1, in2} = 3'(k);
      #1;
      checks++;
      if (y !== ((k >= 4) ? k[0] : k[1])) begin
        failures++;
        $display("mux: s=%0b in1=%0b in2=%0b got y=%0b", s, in1, in2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_gdi_mux2
