// tb_cic_interpolator -- checks the CIC interpolator against a direct model.
//
// Two interpolators run side by side on the same input, one with differential
// delay M = 1 (the default) and one with M = 2 (29-bit word, gain M^N = 8 left
// in the result). For each rate R = 2^1 .. 2^6 they are reset and fed random 8-bit
// samples whenever it raises x_ready, then a step of 127 and a step of -128.
// The model scales each accepted sample by 2^(FRAC - (N-1)*log2 R), applies
// the comb section at the low rate as sum_i (-1)^i C(N,i) x[j - i*M], places
// the result into an otherwise zero high-rate sequence N cycles after the
// sample was taken, and runs N ideal integrators (mod 2^W). The output in
// cycle c must equal the last integrator at c - (2N+1). x_ready must come
// exactly every R cycles, and at the end of each step the integer part of the
// output must equal the step amplitude times M^N (unity DC gain for M = 1). Finally the rate is
// changed without a reset: the filter must clear itself and pass a new step.
module tb_cic_interpolator;
  localparam int N = 3, IN_W = 8, RB = 6;
  localparam int FRAC = N * RB;
  localparam int W1 = IN_W + N * RB;          // M = 1
  localparam int W2 = IN_W + N * (RB + 1);    // M = 2
  localparam int LAT = 2 * N + 1;
  localparam int NSAMP = 40;

  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic signed [IN_W-1:0] x_in;
  logic rdy1, rdy2, rc1, rc2;
  logic [W1-1:0] y1;
  logic [W1-FRAC-1:0] y1_int;
  logic [W2-1:0] y2;
  logic [W2-FRAC-1:0] y2_int;

  longint xs [$];                 // accepted samples, scaled, not masked
  longint u1 [int], u2 [int];     // expanded sequences (M = 1, M = 2)
  longint ia [2][3];
  longint i3h [2][int];
  int checks = 0, failures = 0;

  cic_interpolator #(.N(N), .M(1), .IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(3)) dut (
    .clk, .rst_n, .sel, .x_in, .x_ready(rdy1), .y_out(y1), .y_int(y1_int), .rate_clk(rc1));
  cic_interpolator #(.N(N), .M(2), .IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(3)) dut_m2 (
    .clk, .rst_n, .sel, .x_in, .x_ready(rdy2), .y_out(y2), .y_int(y2_int), .rate_clk(rc2));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint mask_of(int v);
    return (longint'(1) << ((v == 0) ? W1 : W2)) - 1;
  endfunction

  function automatic longint binom(int n, int k);
    longint b = 1;
    for (int i = 0; i < k; i++) b = b * (n - i) / (i + 1);
    return b;
  endfunction

  // low-rate comb section applied to the newest accepted sample, variant v
  function automatic longint comb_model(int v);
    longint acc = 0;
    int j = xs.size() - 1;
    int m = v + 1;
    for (int i = 0; i <= N; i++)
      if (j - i * m >= 0) acc += ((i % 2) ? -1 : 1) * binom(N, i) * xs[j - i * m];
    return acc & mask_of(v);
  endfunction

  initial begin
    int r, last_rdy, nrdy, ncyc, xv;
    longint ref_y, uv, yv [2], yi [2];
    for (int k = 1; k <= RB; k++) begin
      r = 1 << k;
      sel = 3'(k);
      x_in = '0;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      xs.delete(); u1.delete(); u2.delete();
      for (int v = 0; v < 2; v++) begin
        ia[v] = '{0, 0, 0};
        i3h[v].delete();
      end
      last_rdy = -1; nrdy = 0;
      ncyc = 3 * NSAMP * r;
      for (int t = 0; t < ncyc; t++) begin
        yv = '{longint'(y1), longint'(y2)};
        yi = '{longint'($signed(y1_int)), longint'($signed(y2_int))};
        for (int v = 0; v < 2; v++) begin
          // model integrators over the expanded sequence, value for index t
          if (v == 0) uv = u1.exists(t) ? u1[t] : 0;
          else        uv = u2.exists(t) ? u2[t] : 0;
          ia[v][0] = (ia[v][0] + uv) & mask_of(v);
          ia[v][1] = (ia[v][1] + ia[v][0]) & mask_of(v);
          ia[v][2] = (ia[v][2] + ia[v][1]) & mask_of(v);
          i3h[v][t] = ia[v][2];
          ref_y = (t - LAT >= 0) ? i3h[v][t - LAT] : 0;
          checks++;
          if (yv[v] != ref_y) begin
            failures++;
            if (failures < 10)
              $display("M=%0d R=%0d t=%0d got %h expected %h", v + 1, r, t, yv[v], ref_y);
          end
          if (t == 2 * NSAMP * r - 1 || t == ncyc - 1) begin
            checks++;
            if (yi[v] != ((t < 2 * NSAMP * r) ? 127 : -128) * ((v == 0) ? 1 : 8)) begin
              failures++;
              $display("M=%0d R=%0d step output %0d", v + 1, r, yi[v]);
            end
          end
        end
        if (t < NSAMP * r)          xv = $urandom_range(0, 255) - 128;
        else if (t < 2 * NSAMP * r) xv = 127;
        else                        xv = -128;
        x_in = IN_W'(xv);
        checks++;
        if (rdy1 != rdy2) begin
          failures++;
          $display("R=%0d t=%0d x_ready differs between the two filters", r, t);
        end
        if (rdy1) begin
          if (last_rdy >= 0) begin
            checks++;
            if (t - last_rdy != r) begin
              failures++;
              $display("R=%0d x_ready spacing %0d", r, t - last_rdy);
            end
          end
          last_rdy = t;
          nrdy++;
          xs.push_back(longint'(xv) << (FRAC - (N - 1) * k));
          u1[t + N] = comb_model(0);
          u2[t + N] = comb_model(1);
        end
        @(negedge clk);
      end
      checks++;
      if (nrdy < 3 * NSAMP - 2) begin
        failures++;
        $display("R=%0d only %0d inputs taken", r, nrdy);
      end
    end
    // Rate change without reset (64 -> 4): the filters must clear themselves
    // in the next cycle and then pass a step of 100.
    sel = 3'd2;
    x_in = IN_W'(100);
    @(negedge clk);
    checks++;
    if (y1 != '0 || y2 != '0) begin
      failures++;
      $display("rate change did not clear the filters: %h %h", y1, y2);
    end
    repeat (40 * 4) @(negedge clk);
    checks++;
    if ($signed(y1_int) != 100 || $signed(y2_int) != 800) begin
      failures++;
      $display("after rate change the step gave %0d and %0d", $signed(y1_int), $signed(y2_int));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
