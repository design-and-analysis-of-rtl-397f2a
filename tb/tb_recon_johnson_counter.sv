// tb_recon_johnson_counter: end-to-end self-checking test of the
// reconfigurable Johnson counter at its default size (no parameter override).
//
// Inputs are changed on the falling clock edge and the outputs are checked one
// time unit after each rising edge. Expected values come from two sources
// written independently of the design: a closed formula for the k-th Johnson
// vector (k low bits set for k <= L, then the ones drain out from the bottom)
// and, for random stimulus, a shadow model of the two modes.
//
// Mechanisms exercised and counted (each must occur at least once):
//   init     - clearing every stage by holding RST low for L clocks in count
//              mode, starting from the random power-up state;
//   wrap     - a full 2L-state Johnson period returning to all zeros;
//   clear    - clearing from the all-ones state mid-count, with the latency
//              checked: not yet zero after L-1 clocks, zero after L;
//   rotate   - a full L-clock rotation returning the stored vector;
//   rst_ign  - RST low in rotate mode leaving the rotation unaffected;
//   to_rot / to_cnt - switches between the two modes mid-operation.
module tb_recon_johnson_counter;
  import johnson_pkg::*;

  localparam int unsigned N = JC_STAGES;
  localparam logic [N-1:0] ALL1 = '1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  mode_e        mode = MODE_COUNT;
  logic [N-1:0] j;

  int checks = 0, failures = 0;
  int n_init = 0, n_wrap = 0, n_clear = 0, n_rotate = 0, n_rst_ign = 0;
  int n_to_rot = 0, n_to_cnt = 0;

  recon_johnson_counter dut (.clk(clk), .rst_n(rst_n), .mode(mode), .j(j));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k-th vector of the Johnson sequence starting from zero, 0 <= k < 2N.
  function automatic logic [N-1:0] johnson_vec(int unsigned k);
    logic [N-1:0] v;
    v = '0;
    for (int unsigned b = 0; b < N; b++) begin
      if (k <= N) v[b] = (b < k);
      else        v[b] = (b >= k - N);
    end
    return v;
  endfunction

  // v rotated by r places towards the higher stages, the top bit wrapping to 0.
  function automatic logic [N-1:0] rotate_by(logic [N-1:0] v, int unsigned r);
    logic [N-1:0] o;
    for (int unsigned b = 0; b < N; b++) o[(b + r) % N] = v[b];
    return o;
  endfunction

  task automatic check(logic [N-1:0] expected, string what);
    checks++;
    if (j !== expected) begin
      failures++;
      $display("%s: expected %b got %b at %0t", what, expected, j, $time);
    end
  endtask

  // Apply inputs for one clock and wait until the result is visible.
  task automatic step(mode_e m, logic r);
    @(negedge clk);
    if (m != mode) begin
      if (m == MODE_ROTATE) n_to_rot++;
      else                  n_to_cnt++;
    end
    mode  = m;
    rst_n = r;
    @(posedge clk);
    #1;
  endtask

  logic [N-1:0] prev, saved, shadow;
  int unsigned  k;

  initial begin
    // ---- init: clear from the random power-up state -----------------------
    for (int unsigned c = 1; c <= N; c++) begin
      step(MODE_COUNT, 1'b0);
      checks++;
      if ((j & N'((1 << c) - 1)) !== '0) begin
        failures++;
        $display("init: low %0d stages not cleared after %0d clocks: %b", c, c, j);
      end
    end
    check('0, "init");
    if (j == '0) n_init++;

    // ---- wrap: two full Johnson periods ------------------------------------
    prev = j;
    for (k = 1; k <= 4 * N; k++) begin
      step(MODE_COUNT, 1'b1);
      check(johnson_vec(k % (2 * N)), "count");
      checks++;
      if ($countones(j ^ prev) != 1) begin
        failures++;
        $display("count: %b -> %b is not a single-bit change", prev, j);
      end
      prev = j;
      if (k % (2 * N) == 0 && j == '0) n_wrap++;
    end

    // ---- clear: from all ones, latency of exactly N clocks -----------------
    for (k = 1; k <= N; k++) step(MODE_COUNT, 1'b1);
    check(ALL1, "count to all ones");
    for (k = 1; k < N; k++) step(MODE_COUNT, 1'b0);
    checks++;
    if (j == '0) begin
      failures++;
      $display("clear: counter already zero after %0d clocks", N - 1);
    end
    check(ALL1 << (N - 1), "clear after N-1 clocks");
    step(MODE_COUNT, 1'b0);
    check('0, "clear after N clocks");
    if (j == '0) n_clear++;

    // ---- rotate: load Johnson state 2, then circulate it ------------------
    step(MODE_COUNT, 1'b1);
    step(MODE_COUNT, 1'b1);
    check(johnson_vec(2), "count to state 2");
    saved = j;
    for (k = 1; k <= N; k++) begin
      // RST is driven low on every other rotate clock: it must not matter
      step(MODE_ROTATE, 1'(k % 2));
      check(rotate_by(saved, k), "rotate");
      if (k % 2 == 0 && j == rotate_by(saved, k)) n_rst_ign++;
    end
    if (j == saved) n_rotate++;
    // second rotation with RST held low throughout
    for (k = 1; k <= N; k++) begin
      step(MODE_ROTATE, 1'b0);
      check(rotate_by(saved, k), "rotate, RST low");
    end
    if (j == saved) n_rst_ign++;

    // ---- back to count: the sequence continues from state 2 ----------------
    for (k = 3; k < 3 + 2 * N; k++) begin
      step(MODE_COUNT, 1'b1);
      check(johnson_vec(k % (2 * N)), "count after rotate");
    end

    // ---- random mix of modes and RST against a shadow model ---------------
    shadow = j;
    for (int n = 0; n < 3000; n++) begin
      mode_e m;
      logic  r;
      logic  first;
      m = ($urandom % 4 == 0) ? MODE_ROTATE : MODE_COUNT;
      r = ($urandom % 8 != 0);
      step(m, r);
      first  = (m == MODE_COUNT) ? (r & ~shadow[N-1]) : shadow[N-1];
      shadow = {shadow[N-2:0], first};
      check(shadow, "random");
    end

    // ---- every mechanism must have happened --------------------------------
    if (n_init == 0)    begin failures++; $display("init never happened");    end
    if (n_wrap == 0)    begin failures++; $display("wrap never happened");    end
    if (n_clear == 0)   begin failures++; $display("clear never happened");   end
    if (n_rotate == 0)  begin failures++; $display("rotate never happened");  end
    if (n_rst_ign == 0) begin failures++; $display("rst_ign never happened"); end
    if (n_to_rot == 0)  begin failures++; $display("to_rot never happened");  end
    if (n_to_cnt == 0)  begin failures++; $display("to_cnt never happened");  end
    $display("mechanisms: init=%0d wrap=%0d clear=%0d rotate=%0d rst_ign=%0d to_rot=%0d to_cnt=%0d",
             n_init, n_wrap, n_clear, n_rotate, n_rst_ign, n_to_rot, n_to_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_recon_johnson_counter
