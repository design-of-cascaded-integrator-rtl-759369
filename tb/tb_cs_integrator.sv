// tb_cs_integrator -- checks the carry-save integrator against a running sum.
//
// Random input values are split into random carry-save pairs (s, c with
// s + c = value) and fed one per clock. The integrator's state, read as
// s + c mod 2^W, must equal the sum of all inputs up to two cycles earlier
// (one cycle of input register, one of state register). Also checks that the
// state is zero during and right after reset.
module tb_cs_integrator;
  localparam int W = 26;
  localparam longint MASK = (longint'(1) << W) - 1;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_s, in_c, out_s, out_c;
  longint vals [CYCLES];
  longint acc;
  int checks = 0, failures = 0;

  cs_integrator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_s = '0; in_c = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (((out_s + out_c) & W'(MASK)) != '0) failures++;
    acc = 0;
    for (int t = 0; t < CYCLES; t++) begin
      // observe cycle t: state holds the sum of inputs 0 .. t-2
      if (t >= 2) acc = (acc + vals[t-2]) & MASK;
      if (t == 0) rst_n = 1;
      checks++;
      if (longint'(W'(out_s + out_c)) != acc) begin
        failures++;
        if (failures < 10) $display("t=%0d got %h expected %h", t, W'(out_s + out_c), acc);
      end
      vals[t] = (t < 200) ? longint'($urandom_range(0, 3)) : {$urandom, $urandom} & MASK;
      in_s = W'({$urandom, $urandom});
      in_c = W'(vals[t] - longint'(in_s));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
