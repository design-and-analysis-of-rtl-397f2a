# Reconfigurable 4-bit Johnson counter

A Johnson counter is a shift register that feeds the complement of its last
stage back into its first. From all zeros, an L-stage counter steps through
2L states, and each step changes exactly one bit:

| clock | j[3:0] | clock | j[3:0] |
|------:|:------:|------:|:------:|
| 0     | 0000   | 4     | 1111   |
| 1     | 0001   | 5     | 1110   |
| 2     | 0011   | 6     | 1100   |
| 3     | 0111   | 7     | 1000   |

A single-bit change per step keeps switching activity low. That makes the
sequence a good source of low-power test vectors, and it is why the counter
was designed for low power in the first place. This design adds one
multiplexer in front of the first stage. The mux gives the counter a second
mode: in that mode the stored vector circulates unchanged instead of counting.
The logic is small, with four flip-flops and three gates. The subtle part is
how the counter gets into a known state, because its flip-flops have no reset.

## The two modes

The first stage's input `d0` is chosen by `mode`:

| mode | name        | d0                    | behaviour |
|:----:|-------------|-----------------------|-----------|
| 1    | count       | `~j[L-1] & rst_n`     | Johnson sequence while `rst_n` = 1; zeros shifted in while `rst_n` = 0 |
| 0    | rotate      | `j[L-1]`              | last bit written back into the first stage; the vector circulates with period L |

The other stages always shift: `j[i] <= j[i-1]`.

Points that are easy to miss:

- **`rst_n` is not a reset.** It only gates the Johnson feedback through the
  AND gate. It acts on the clock edge, and only in count mode. In rotate mode
  it has no effect at all.
- **Clearing takes L clocks.** With `mode` = 1 and `rst_n` = 0, one zero
  enters per clock. The counter is all zeros after exactly L clocks (4 at the
  default size), not before. Starting from 1111, the state after 3 clocks is
  1000.
- **The power-up state is unknown.** The stage flip-flops have no reset pin.
  Drive `mode` = 1 and `rst_n` = 0 for L clocks before relying on `j`.
- **Rotate does not keep the Johnson property.** Rotating 0011 gives 0110,
  1100, 1001 and then 0011 again. The middle vectors are not Johnson states.
  If count mode is resumed after a whole number of L-clock rotations, the
  sequence continues from where it stopped. If it is resumed at any other
  point, the counter runs an off-sequence cycle. Clear it (as above) to get
  back onto the Johnson sequence.

## Structure

```
             rst_n ──┐
   ┌─ inv_gate ─► a  gdi_and2 ──► in2 ┐
   │                                  gdi_mux2 ──► d ml_dff ─► j[0] ─► ml_dff ─► j[1] ─► ... ─► j[L-1] ─┐
   ├────────────────────────────► in1 ┘   ▲ s = (mode == count)                                        │
   └────────────────────────────────────────────────────────────────────────────────────────────────────┘
```

| module                  | role |
|-------------------------|------|
| `recon_johnson_counter` | top: the chain of L stages, the feedback mux, AND and inverter |
| `ml_dff`                | one stage: an edge-triggered D flip-flop with no reset |
| `gdi_mux2`              | 2:1 mux, `y = s ? in2 : in1` |
| `gdi_and2`              | 2-input AND that gates the count feedback with `rst_n` |
| `inv_gate`              | makes the complement of the last stage |
| `johnson_pkg`           | `JC_STAGES` (default L = 4) and the `mode_e` enum (`MODE_COUNT` = 1, `MODE_ROTATE` = 0) |

## The cells and what the RTL keeps of them

The counter was designed as a transistor-level circuit for an 18 nm FinFET
process, and its gates are circuit-level designs. The RTL keeps the logic
function of each gate. It does not keep the circuit.

- **Flip-flop.** An 18-transistor (9 PFET, 9 NFET) mixed-logic master-slave
  flip-flop with a single clock phase. The master is a CMOS set-reset style
  latch. The slave is built from pass transistors. There is no locally
  inverted clock, which keeps the clock load small. In the RTL it is
  `always_ff @(posedge clk) q <= d;`.
- **Multiplexer.** A gate-diffusion-input (GDI) mux. An inverter makes
  SC = ~S. A PFET gated by S passes in1 and an NFET gated by S passes in2. A
  second NFET, gated by SC, is placed in parallel with the in1 PFET to
  restore full swing.
- **AND gate.** A two-transistor GDI cell. Input A drives both gates. The
  PFET's diffusion is tied to ground and the NFET's diffusion to input B. A = 1
  passes B and A = 0 passes ground.
- **Inverter.** A plain static inverter. Its circuit is not specified further.

Power, delay, process corners, supply and temperature behaviour, and
Monte-Carlo spread are properties of those circuits. None of them is
represented here. The RTL also says nothing about what clock rate the cells
reach.

## Interface and timing

`recon_johnson_counter #(parameter int unsigned L = 4)`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | common clock for all stages, rising edge |
| `rst_n` | in  | 1     | RST: 0 clears through the feedback (count mode only), 1 lets it count |
| `mode`  | in  | 1 (`johnson_pkg::mode_e`) | 1 = count, 0 = rotate |
| `j`     | out | L     | stage outputs, `j[0]` is the stage fed by the mux |

All outputs come straight from flip-flops. `mode` and `rst_n` are sampled at a
rising edge and affect `j` one clock later. There is no combinational path
from input to output. `L` may be set to any value of 2 or more. The Johnson
period is then 2L and the rotate period is L.

## Choices made in this implementation

- The active clock edge is the rising edge. The design does not say which
  edge it uses.
- The port is named `rst_n` because 0 is its clearing level. It is the
  design's RST/Reset input.
- Bit order: `j[0]` is the first stage. When counting from zero, ones fill
  in from `j[0]` upward.
- Rotate mode writes the last bit into the first stage. The design's own
  wording of this mode varies. The rotation is what its wiring does, and it
  is the reading used here.
- The stages have no reset and no Q-bar output. The inverter provides the
  only complement the design needs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_inv_gate`, `tb_gdi_and2`, `tb_gdi_mux2`: exhaustive truth tables.
- `tb_ml_dff`: 200 random bits with one clock of latency. `d` is also
  toggled while the clock is high and while it is low, to show that `q`
  holds. A latch or a flip-flop on the wrong edge fails this test.
- `tb_recon_johnson_counter`: runs the whole counter at its default size
  (L = 4). It covers:
  - clearing from the random power-up state, with the lowest c stages
    checked to be zero after c clocks;
  - two full Johnson periods, checked against a closed formula for the k-th
    vector and for single-bit changes;
  - clearing from 1111, checked to be not yet zero after 3 clocks and zero
    after 4;
  - full rotations with `rst_n` toggled and held low, to show it is ignored;
  - a return to count mode that continues the sequence;
  - 3000 clocks of random `mode` and `rst_n`, checked against a shadow model.

  The testbench counts how often each mechanism happened (clear, wrap,
  rotate, RST ignored, switches each way). It fails if any count is zero.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_recon_johnson_counter \
    rtl/johnson_pkg.sv tb/tb_recon_johnson_counter.sv
obj_dir/Vtb_recon_johnson_counter +verilator+rand+reset+2
```

Use the same command for the other testbenches, with their names in place
of `tb_recon_johnson_counter`. `+verilator+rand+reset+2` starts the flip-flops
at random values, which is the condition the clearing test is meant for.
