// recon_johnson_counter: reconfigurable L-stage Johnson counter.
//
// A Johnson (twisted-ring) counter is a shift register whose first stage is
// fed the complement of its last stage. From all zeros it steps through 2L
// states, changing exactly one bit per clock (0000, 0001, 0011, 0111, 1111,
// 1110, 1100, 1000 for L = 4), which keeps switching activity low when the
// vectors are used as test patterns.
//
// Structure (all from the counter's schematic): L D flip-flops (ml_dff) form a
// shift chain j[0] -> j[1] -> ... -> j[L-1] on a common clock. The input of
// the first stage comes from a 2:1 multiplexer (gdi_mux2) whose select is
// Mode:
//   mode = 1 (count):  d0 = ~j[L-1] & rst_n, through an inverter (inv_gate)
//                      and an AND gate (gdi_and2). With rst_n high the chain
//                      runs the Johnson sequence. With rst_n low zeros are
//                      shifted in, so every stage is cleared after L clocks.
//   mode = 0 (rotate): d0 = j[L-1]. The last bit is written back into the
//                      first position, so the stored vector circulates
//                      unchanged with period L; rst_n has no effect.
//
// rst_n is the counter's RST input. It is not an asynchronous reset: it only
// gates the feedback, and it only acts in count mode. The stages have no reset
// of their own, so after power-up the state is undefined until rst_n has been
// held low in count mode for L clocks (or a full rotate/count history is
// known).
//
// Interface: clk, rst_n, mode in; j[L-1:0] out, j[0] being the first stage.
// Timing: every output is a register output; inputs are sampled at the rising
// clock edge and take effect on j one clock later.
//
// L defaults to 4, the width of the design; the chain works for any L >= 2.
// The port name rst_n, the active-high sense of "keep counting" on it, and
// the rising clock edge are this implementation's reading of the design.
module recon_johnson_counter #(
  parameter int unsigned L = johnson_pkg::JC_STAGES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  johnson_pkg::mode_e mode,
  output logic [L-1:0]       j
);

  logic last_n;   // complement of the last stage
  logic fb_count; // count-mode feedback: ~j[L-1] gated by rst_n
  logic d0;       // data input of the first stage

  inv_gate u_inv (
    .a (j[L-1]),
    .y (last_n)
  );

  gdi_and2 u_and (
    .a (last_n),
    .b (rst_n),
    .y (fb_count)
  );

  gdi_mux2 u_mux (
    .s   (mode == johnson_pkg::MODE_COUNT),
    .in1 (j[L-1]),
    .in2 (fb_count),
    .y   (d0)
  );

  ml_dff u_stage0 (
    .clk (clk),
    .d   (d0),
    .q   (j[0])
  );

  for (genvar i = 1; i < int'(L); i++) begin : g_stage
    ml_dff u_stage (
      .clk (clk),
      .d   (j[i-1]),
      .q   (j[i])
    );
  end

endmodule : recon_johnson_counter
