// tb_ml_dff: self-checking test of the D flip-flop.
// Random data is applied on the falling clock edge; after each rising edge q
// must equal the d sampled there (one clock of latency). Between edges d is
// toggled again and q is checked to hold, so a transparent latch or a
// flip-flop on the wrong edge fails. The clock period is 10 time units.
module tb_ml_dff;
  logic clk = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic sampled;

  ml_dff dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = 1'($urandom);
      sampled = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("dff: cycle %0d expected q=%0b got %0b", n, sampled, q);
      end
      // disturb d while clk is high, then while it is low: q must hold
      d = ~d;
      #2;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("dff: cycle %0d q changed while clk high", n);
      end
      @(negedge clk);
      #1;
      d = ~d;
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("dff: cycle %0d q changed while clk low", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ml_dff
