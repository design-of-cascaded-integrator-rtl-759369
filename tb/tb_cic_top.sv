// tb_cic_top -- end-to-end test of both filters at the default configuration.
//
// Phase 1 runs the decimator and the interpolator at the same time on random
// 8-bit inputs and steps through all six rates without a reset in between
// (decimator 2,4,..,64; interpolator 64,32,..,2), so every rate and every
// mode switch is exercised while the filters hold data. Each filter is
// compared with an integer model (as in the block testbenches); after a rate
// change the decimator's first N+1 results, which still mix the two rates in
// its comb delay lines, and the first output/input spacing are not checked.
// Phase 2 loops the interpolator's integer output back into the decimator at
// the same rate (a transmit filter followed by a receive filter) and checks
// that a step passes through with unity gain at R = 8, 64 and 2, changing the
// rate without a reset in between. The interpolator clears itself on a rate
// change; its model restarts in the cycle after the change.
//
// Mechanisms counted, each must occur: results at every decimation rate,
// inputs taken at every interpolation rate, rate switches of each filter
// while running, wrap-around of the modular integrators, loop-back steps.
module tb_cic_top;
  localparam int N = cic_pkg::N_STAGES, M = cic_pkg::DIFF_DELAY;
  localparam int IN_W = cic_pkg::IN_WIDTH, RB = cic_pkg::RATE_BITS;
  localparam int FRAC = N * RB;
  localparam int W = IN_W + N * RB;
  localparam int DLAT = 3 * N + 1;
  localparam int ILAT = 2 * N + 1;
  localparam longint MASK = (longint'(1) << W) - 1;
  localparam int SEG = 40 * 64;
  localparam int CYC1 = 6 * SEG;

  logic clk = 0, rst_n = 0;
  logic [2:0] dec_sel, int_sel;
  logic signed [IN_W-1:0] dec_x, int_x;
  logic [W-1:0] dec_y, int_y;
  logic [W-FRAC-1:0] dec_y_int, int_y_int;
  logic dec_y_valid, dec_rate_clk, int_x_ready, int_rate_clk;

  cic_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int dec_outs [1:RB];
  int int_ins [1:RB];
  int dec_switches = 0, int_switches = 0, wraps = 0, loop_steps = 0;

  longint d1, d2, d3;
  longint d3h [CYC1];
  longint xs [$];
  longint u [int];
  longint j1, j2, j3;
  longint j3h [int];

  initial begin
    repeat (CYC1 + 16 * SEG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint binom(int n, int k);
    longint b = 1;
    for (int i = 0; i < k; i++) b = b * (n - i) / (i + 1);
    return b;
  endfunction

  function automatic longint sx(longint v);   // W-bit value as signed
    return (v >= (longint'(1) << (W - 1))) ? v - (longint'(1) << W) : v;
  endfunction

  function automatic longint dec_model(int n, int r);
    longint acc = 0;
    for (int j = 0; j <= N; j++)
      if (n - j * r * M >= 0) acc += ((j % 2) ? -1 : 1) * binom(N, j) * d3h[n - j * r * M];
    return acc & MASK;
  endfunction

  function automatic longint int_comb_model();
    longint acc = 0;
    int j = xs.size() - 1;
    for (int i = 0; i <= N; i++)
      if (j - i * M >= 0) acc += ((i % 2) ? -1 : 1) * binom(N, i) * xs[j - i * M];
    return acc & MASK;
  endfunction

  // Phase 2: run both filters at rate 2^k with the loop closed, step through
  // +127 and -100, check the decimator's integer result at the end of each.
  task automatic loopback(int k);
    dec_sel = 3'(k);
    int_sel = 3'(k);
    for (int s = 0; s < 2; s++) begin
      int amp = (s == 0) ? 127 : -100;
      for (int t = 0; t < 4 * SEG / 2; t++) begin
        int_x = IN_W'(amp);
        dec_x = $signed(int_y_int);
        @(negedge clk);
      end
      checks++;
      if ($signed(dec_y_int) != amp) begin
        failures++;
        $display("loop-back R=%0d step %0d gave %0d", 1 << k, amp, $signed(dec_y_int));
      end else loop_steps++;
    end
  endtask

  initial begin
    int dk, ik, dr, dlast, ilast, since_d, since_i, xv, yv, i_t0;
    bit clearing;
    longint ref_y, nx;
    dec_sel = 3'd1; int_sel = 3'(RB);
    dec_x = '0; int_x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    d1 = 0; d2 = 0; d3 = 0; j1 = 0; j2 = 0; j3 = 0;
    dlast = -1; ilast = -1; since_d = 0; since_i = 0; i_t0 = 0; clearing = 0;
    for (int t = 0; t < CYC1; t++) begin
      dk = 1 + t / SEG;
      ik = RB - t / SEG;
      // a rate change clears the interpolator at the end of this cycle: its
      // model restarts next cycle
      if (clearing) begin
        j1 = 0; j2 = 0; j3 = 0;
        xs.delete(); u.delete();
        i_t0 = t;
        clearing = 0;
      end
      if (t > 0 && t % SEG == 0) begin
        dec_switches++; int_switches++;
        since_d = 0; since_i = 0;
        clearing = 1;
      end
      dec_sel = 3'(dk);
      int_sel = 3'(ik);
      dr = 1 << dk;
      // decimator output of cycle t
      if (dec_y_valid) begin
        since_d++;
        if (since_d > N + 1) begin
          checks++;
          if (longint'(dec_y) != dec_model(t - DLAT, dr)) begin
            failures++;
            if (failures < 10) $display("dec R=%0d t=%0d got %h expected %h",
                                        dr, t, dec_y, dec_model(t - DLAT, dr));
          end
          checks++;
          if (t - dlast != dr) begin
            failures++;
            $display("dec R=%0d spacing %0d", dr, t - dlast);
          end
          dec_outs[dk]++;
        end
        dlast = t;
      end
      // interpolator output of cycle t
      j1 = (j1 + (u.exists(t) ? u[t] : 0)) & MASK;
      j2 = (j2 + j1) & MASK;
      nx = sx(j3) + sx(j2);
      if (nx >= (longint'(1) << (W - 1)) || nx < -(longint'(1) << (W - 1))) wraps++;
      j3 = (j3 + j2) & MASK;
      j3h[t] = j3;
      ref_y = (t - ILAT >= i_t0) ? j3h[t - ILAT] : 0;
      checks++;
      if (longint'(int_y) != ref_y) begin
        failures++;
        if (failures < 10) $display("int t=%0d got %h expected %h", t, int_y, ref_y);
      end
      // inputs of cycle t
      xv = $urandom_range(0, 255) - 128;
      yv = $urandom_range(0, 255) - 128;
      dec_x = IN_W'(xv);
      int_x = IN_W'(yv);
      d1 = (d1 + ((longint'(xv) << (FRAC - N * dk)) & MASK)) & MASK;
      d2 = (d2 + d1) & MASK;
      nx = sx(d3) + sx(d2);
      if (nx >= (longint'(1) << (W - 1)) || nx < -(longint'(1) << (W - 1))) wraps++;
      d3 = (d3 + d2) & MASK;
      d3h[t] = d3;
      if (int_x_ready && !clearing) begin
        since_i++;
        if (since_i > 1) begin
          checks++;
          if (t - ilast != (1 << ik)) begin
            failures++;
            $display("int R=%0d x_ready spacing %0d", 1 << ik, t - ilast);
          end
          int_ins[ik]++;
        end
        ilast = t;
        xs.push_back((longint'(yv) << (FRAC - (N - 1) * ik)) & MASK);
        u[t + N] = int_comb_model();
      end
      @(negedge clk);
    end

    // Phase 2: loop-back.
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    loopback(3);
    loopback(RB);
    loopback(1);

    // every mechanism must have happened
    for (int k = 1; k <= RB; k++) begin
      checks += 2;
      if (dec_outs[k] == 0) begin failures++; $display("no decimator results at R=%0d", 1 << k); end
      if (int_ins[k] == 0)  begin failures++; $display("no interpolator inputs at R=%0d", 1 << k); end
    end
    checks += 4;
    if (dec_switches == 0) begin failures++; $display("decimator rate never switched"); end
    if (int_switches == 0) begin failures++; $display("interpolator rate never switched"); end
    if (wraps == 0)        begin failures++; $display("integrators never wrapped"); end
    if (loop_steps == 0)   begin failures++; $display("no loop-back step passed"); end
    for (int k = 1; k <= RB; k++)
      $display("R=%0d: %0d decimator results, %0d interpolator inputs checked",
               1 << k, dec_outs[k], int_ins[k]);
    $display("rate switches: dec %0d int %0d, integrator wrap-arounds %0d, loop-back steps %0d",
             dec_switches, int_switches, wraps, loop_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
