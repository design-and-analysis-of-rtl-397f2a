// inv_gate: inverter that produces the complement of the counter's last stage.
//
// The counter's stage cells have only a true output Q, so a separate inverter
// turns the last stage's Q into the Q-bar that the Johnson feedback needs.
// Its circuit is not given beyond its place in the counter; it is taken here
// as a plain static inverter.
//
// Interface: a in, y = ~a out. Purely combinational, no state.
module inv_gate (
  input  logic a,
  output logic y
);

  always_comb begin
    y = ~a;
  end

endmodule : inv_gate
