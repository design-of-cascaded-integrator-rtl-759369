// tb_cic_step_n1 -- step response of a single-stage CIC decimator.
//
// The decimator is built with N = 1, M = 1 and given a step of amplitude 127
// at every rate R = 2^1 .. 2^6, starting from reset. A single-stage CIC filter
// is a moving sum over R inputs, so with the input scaled by 1/R the result
// for input index n is 127 * min(n+1, R) / R exactly: a straight ramp that
// reaches the step amplitude after R inputs and stays there. Every valid
// result is compared with that ramp at n = t - (3N+1), results must come
// every R cycles, and the final integer result must be 127.
module tb_cic_step_n1;
  localparam int N = 1, M = 1, IN_W = 8, RB = 6;
  localparam int FRAC = N * RB;
  localparam int W = IN_W + N * RB;
  localparam int LAT = 3 * N + 1;
  localparam int AMP = 127;

  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic signed [IN_W-1:0] x_in;
  logic [W-1:0] y_out;
  logic [W-FRAC-1:0] y_int;
  logic y_valid, rate_clk;
  int checks = 0, failures = 0;

  cic_decimator #(.N(N), .M(M), .IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, n, last_valid, outs;
    longint expv;
    for (int k = 1; k <= RB; k++) begin
      r = 1 << k;
      sel = 3'(k);
      x_in = '0;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      last_valid = -1; outs = 0;
      for (int t = 0; t < 12 * r + LAT; t++) begin
        if (y_valid) begin
          n = t - LAT;
          expv = (n < 0) ? 0 : (longint'(AMP) << (FRAC - k)) * ((n + 1 < r) ? n + 1 : r);
          checks++;
          if (longint'(y_out) != expv) begin
            failures++;
            $display("R=%0d t=%0d got %0d expected %0d", r, t, y_out, expv);
          end
          if (last_valid >= 0) begin
            checks++;
            if (t - last_valid != r) begin
              failures++;
              $display("R=%0d spacing %0d", r, t - last_valid);
            end
          end
          last_valid = t;
          outs++;
        end
        x_in = IN_W'(AMP);
        @(negedge clk);
      end
      checks += 2;
      if ($signed(y_int) != AMP) begin
        failures++;
        $display("R=%0d settled at %0d", r, $signed(y_int));
      end
      if (outs < 10) begin
        failures++;
        $display("R=%0d only %0d results", r, outs);
      end
      $display("R=%0d: step settled at %0d after %0d results", r, $signed(y_int), outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
