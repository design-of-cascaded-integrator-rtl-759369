// tb_prog_decimator -- checks the programmable rate generator.
//
// For every select code (0 .. 7, with 0 and codes above 6 clamped), resets
// the block and measures the selected rate clock: the distance between
// rate_en pulses must be R = 2^k cycles, rate_en must coincide with the
// rising edges of rate_clk, and rate_clk must be high for R/2 cycles of each
// period. The first period after reset is not measured.
module tb_prog_decimator;
  localparam int RB = 6;

  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic rate_clk, rate_en, clk_q;
  int checks = 0, failures = 0;

  prog_decimator #(.RATE_BITS(RB), .SEL_WIDTH(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, r, last_en, high_cnt, pulses;
    for (int s = 0; s < 8; s++) begin
      k = (s < 1) ? 1 : (s > RB) ? RB : s;
      r = 1 << k;
      sel = 3'(s);
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      clk_q = 0;
      last_en = -1; high_cnt = 0; pulses = 0;
      for (int t = 0; t < 12 * r + 20; t++) begin
        checks++;
        if (rate_en != (rate_clk && !clk_q)) begin
          failures++;
          $display("sel=%0d t=%0d rate_en not on rising edge", s, t);
        end
        if (rate_en) begin
          if (last_en >= 0) begin
            checks += 2;
            if (t - last_en != r) begin
              failures++;
              $display("sel=%0d period %0d expected %0d", s, t - last_en, r);
            end
            if (high_cnt != r / 2) begin
              failures++;
              $display("sel=%0d high time %0d expected %0d", s, high_cnt, r / 2);
            end
            pulses++;
          end
          last_en = t;
          high_cnt = 0;
        end
        if (rate_clk) high_cnt++;
        clk_q = rate_clk;
        @(negedge clk);
      end
      checks++;
      if (pulses < 10) begin
        failures++;
        $display("sel=%0d only %0d periods seen", s, pulses);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
