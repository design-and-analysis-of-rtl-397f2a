// ml_dff: the counter's storage element, a single-phase-clocked master-slave
// D flip-flop.
//
// In silicon this cell is an 18-transistor (9 PFET, 9 NFET) mixed-logic
// flip-flop: a CMOS set-reset style master latch followed by a pass-transistor
// slave latch, with one clock phase and no locally generated inverted clock.
// At the register-transfer level only its logic function remains: Q takes the
// value of D at the active clock edge and holds it until the next one.
//
// Interface: clk, d in; q out. No reset pin, as in the cell itself; the
// counter built from it clears its stages through its data path instead.
//
// Timing: edge-triggered, one clock of latency from d to q. The rising edge is
// this implementation's choice (the stage symbol of the counter shows a plain
// clock input); the transistor-level timing, sizing and power behaviour are
// not modelled.
module ml_dff (
  input  logic clk,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule : ml_dff
