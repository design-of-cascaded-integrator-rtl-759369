// tb_cic_decimator -- checks the CIC decimator against a direct model.
//
// Two decimators run side by side on the same input: the default one with
// differential delay M = 1 and one with M = 2 (29-bit word, DC gain M^N = 8
// left in the result). For each rate R = 2^1 .. 2^6 they are reset and fed random 8-bit
// samples, then a step of amplitude 127 and a step of -128. The model scales
// each sample by 2^(FRAC - N*log2 R), runs N ideal integrators with plain
// integer arithmetic (mod 2^W) and evaluates the comb section at the high
// rate as sum_j (-1)^j C(N,j) I_N[n - j*R*M]. Every result the filter marks
// valid must match the model at n = t - (3N+1); valid results must come
// exactly R cycles apart; at the end of each step the integer part of the
// result must equal the step amplitude times M^N (unity DC gain for M = 1).
module tb_cic_decimator;
  localparam int N = 3, IN_W = 8, RB = 6;
  localparam int FRAC = N * RB;
  localparam int W1 = IN_W + N * RB;          // M = 1
  localparam int W2 = IN_W + N * (RB + 1);    // M = 2
  localparam int LAT = 3 * N + 1;
  localparam int HIST = 8192;

  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic signed [IN_W-1:0] x_in;
  logic [W1-1:0] y1;
  logic [W1-FRAC-1:0] y1_int;
  logic [W2-1:0] y2;
  logic [W2-FRAC-1:0] y2_int;
  logic v1, v2, rc1, rc2;

  longint ia [2][3];
  longint i3h [2][HIST];
  int checks = 0, failures = 0;

  cic_decimator #(.N(N), .M(1), .IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(3)) dut (
    .clk, .rst_n, .sel, .x_in, .y_out(y1), .y_int(y1_int), .y_valid(v1), .rate_clk(rc1));
  cic_decimator #(.N(N), .M(2), .IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(3)) dut_m2 (
    .clk, .rst_n, .sel, .x_in, .y_out(y2), .y_int(y2_int), .y_valid(v2), .rate_clk(rc2));

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

  // variant v: 0 is M = 1, 1 is M = 2
  function automatic longint model(int v, int n, int r);
    longint acc = 0;
    int m = v + 1;
    for (int j = 0; j <= N; j++)
      if (n - j * r * m >= 0) acc += ((j % 2) ? -1 : 1) * binom(N, j) * i3h[v][n - j * r * m];
    return acc & mask_of(v);
  endfunction

  initial begin
    int r, xv, ncyc, outs [2], last [2];
    bit valid [2];
    longint yv [2], yi [2];
    for (int k = 1; k <= RB; k++) begin
      r = 1 << k;
      sel = 3'(k);
      x_in = '0;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int v = 0; v < 2; v++) begin
        ia[v] = '{0, 0, 0};
        outs[v] = 0;
        last[v] = -1;
      end
      ncyc = 3 * (40 * r) + 3 * LAT;
      for (int t = 0; t < ncyc; t++) begin
        valid = '{v1, v2};
        yv = '{longint'(y1), longint'(y2)};
        yi = '{longint'($signed(y1_int)), longint'($signed(y2_int))};
        for (int v = 0; v < 2; v++) begin
          // outputs of cycle t
          if (valid[v]) begin
            checks++;
            if (yv[v] != model(v, t - LAT, r)) begin
              failures++;
              if (failures < 10)
                $display("M=%0d R=%0d t=%0d got %h expected %h", v + 1, r, t, yv[v],
                         model(v, t - LAT, r));
            end
            if (last[v] >= 0) begin
              checks++;
              if (t - last[v] != r) begin
                failures++;
                $display("M=%0d R=%0d output spacing %0d", v + 1, r, t - last[v]);
              end
            end
            last[v] = t;
            outs[v]++;
          end
          // end of the positive and of the negative step: DC gain M^N
          if (t == 2 * 40 * r - 1 || t == 3 * 40 * r - 1) begin
            checks++;
            if (yi[v] != ((t < 2 * 40 * r) ? 127 : -128) * ((v == 0) ? 1 : 8)) begin
              failures++;
              $display("M=%0d R=%0d step output %0d", v + 1, r, yi[v]);
            end
          end
        end
        // input of cycle t
        if (t < 40 * r)          xv = $urandom_range(0, 255) - 128;
        else if (t < 2 * 40 * r) xv = 127;
        else                     xv = -128;
        x_in = IN_W'(xv);
        for (int v = 0; v < 2; v++) begin
          ia[v][0] = (ia[v][0] + ((longint'(xv) << (FRAC - N * k)) & mask_of(v))) & mask_of(v);
          ia[v][1] = (ia[v][1] + ia[v][0]) & mask_of(v);
          ia[v][2] = (ia[v][2] + ia[v][1]) & mask_of(v);
          i3h[v][t] = ia[v][2];
        end
        @(negedge clk);
      end
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (outs[v] < 3 * 40 - 2) begin
          failures++;
          $display("M=%0d R=%0d only %0d outputs", v + 1, r, outs[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
