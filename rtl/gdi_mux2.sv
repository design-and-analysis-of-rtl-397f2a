// gdi_mux2: the 2:1 multiplexer in front of the counter's first stage.
//
// The transistor circuit is a gate-diffusion-input (GDI) multiplexer: an
// inverter makes SC = ~S, a PFET gated by S passes in1, an NFET gated by S
// passes in2, and a second NFET gated by SC sits in parallel with the PFET so
// that in1 is passed at full swing. The logic function is therefore
// y = S ? in2 : in1, which is what this module implements. The circuit and
// the select sense follow the design; reducing it to its logic function is
// this implementation's choice, so full-swing and drive effects are absent.
//
// Interface: s (select), in1 (chosen when s = 0), in2 (chosen when s = 1),
// y out. Purely combinational, no state.
module gdi_mux2 (
  input  logic s,
  input  logic in1,
  input  logic in2,
  output logic y
);

  always_comb begin
    if (s) y = in2;
    else   y = in1;
  end

endmodule : gdi_mux2
