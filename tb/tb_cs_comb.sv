// tb_cs_comb -- checks the carry-save comb for M = 1 and M = 2.
//
// Random values, split into random carry-save pairs, are offered every clock
// while en is raised at random. After each enabled cycle the registered
// output, read as s + c mod 2^W, must equal the input of that cycle minus the
// input of the M-th previous enabled cycle (zero before M samples were
// taken). Between enables the output must hold.
module tb_cs_comb;
  localparam int W = 26;
  localparam longint MASK = (longint'(1) << W) - 1;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] in_s, in_c;
  logic [W-1:0] o1_s, o1_c, o2_s, o2_c;
  longint hist [$];
  longint exp1, exp2, v;
  int checks = 0, failures = 0;

  cs_comb #(.W(W), .M(1)) dut1 (.clk, .rst_n, .en, .in_s, .in_c, .out_s(o1_s), .out_c(o1_c));
  cs_comb #(.W(W), .M(2)) dut2 (.clk, .rst_n, .en, .in_s, .in_c, .out_s(o2_s), .out_c(o2_c));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint past(int back);
    return (hist.size() > back) ? hist[hist.size() - 1 - back] : 0;
  endfunction

  initial begin
    in_s = '0; in_c = '0;
    exp1 = 0; exp2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      checks += 2;
      if (longint'(W'(o1_s + o1_c)) != exp1) begin
        failures++;
        if (failures < 10) $display("M=1 t=%0d got %h expected %h", t, W'(o1_s + o1_c), exp1);
      end
      if (longint'(W'(o2_s + o2_c)) != exp2) begin
        failures++;
        if (failures < 10) $display("M=2 t=%0d got %h expected %h", t, W'(o2_s + o2_c), exp2);
      end
      v    = {$urandom, $urandom} & MASK;
      in_s = W'({$urandom, $urandom});
      in_c = W'(v - longint'(in_s));
      en   = ($urandom_range(0, 2) == 0);
      if (en) begin
        exp1 = (v - past(0)) & MASK;
        exp2 = (v - past(1)) & MASK;
        hist.push_back(v);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
