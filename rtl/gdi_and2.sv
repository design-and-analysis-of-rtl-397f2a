// gdi_and2: two-input AND gate in gate-diffusion-input (GDI) style.
//
// The circuit uses two transistors: input A drives the gates of both a PFET
// and an NFET, the PFET's diffusion is tied to ground and the NFET's to input
// B, and the joined drains form the output. With A = 1 the NFET passes B; with
// A = 0 the PFET pulls the output to ground. The logic function is y = A & B.
// The circuit follows the design; modelling only its logic function (not its
// reduced output swing) is this implementation's choice.
//
// Interface: a, b in; y out. Purely combinational, no state. In the counter,
// a is the complement of the last stage and b is the RST input.
module gdi_and2 (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb begin
    // A selects between B (A = 1) and ground (A = 0), as the two transistors do.
    y = a ? b : 1'b0;
  end

endmodule : gdi_and2
