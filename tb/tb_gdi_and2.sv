// tb_gdi_and2: exhaustive self-checking test of the two-input AND gate
// against its truth table (only a = b = 1 gives 1).
module tb_gdi_and2;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b1000; // index {a,b}

  gdi_and2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {a, b} = 2'(k);
      #1;
      checks++;
      if (y !== TRUTH[k]) begin
        failures++;
        $display("and: a=%0b b=%0b got y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_gdi_and2
