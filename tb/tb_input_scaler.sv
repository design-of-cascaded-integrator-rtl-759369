// tb_input_scaler -- exhaustive check of the input scaler.
//
// Applies every 8-bit input with every 3-bit select code, for the decimator
// setting (N stages scaled) and the interpolator setting (N-1 stages scaled),
// and compares the result with x * 2^(FRAC - S*log2 R) worked out with integer
// arithmetic. Combinational: no clock; the watchdog is a time limit.
module tb_input_scaler;
  localparam int IN_W = 8, RB = 6, SW = 3, FRAC = 18, W = 26;

  logic signed [IN_W-1:0] x;
  logic [SW-1:0]          sel;
  logic [W-1:0]           y_dec, y_int;
  int checks = 0, failures = 0;

  input_scaler #(.IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(SW), .SCALE_STAGES(3),
                 .FRAC(FRAC), .W(W)) dut_dec (.x(x), .sel(sel), .y(y_dec));
  input_scaler #(.IN_WIDTH(IN_W), .RATE_BITS(RB), .SEL_WIDTH(SW), .SCALE_STAGES(2),
                 .FRAC(FRAC), .W(W)) dut_int (.x(x), .sel(sel), .y(y_int));

  function automatic longint expect_val(int xv, int s, int stages);
    int k;
    longint v;
    k = (s < 1) ? 1 : (s > RB) ? RB : s;
    v = longint'(xv) * (longint'(1) << (FRAC - stages * k));
    return v & ((longint'(1) << W) - 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int xv = -128; xv < 128; xv++) begin
        x   = IN_W'(xv);
        sel = SW'(s);
        #1;
        checks += 2;
        if (longint'(y_dec) != expect_val(xv, s, 3)) begin
          failures++;
          if (failures < 10) $display("dec scale mismatch x=%0d sel=%0d got %h", xv, s, y_dec);
        end
        if (longint'(y_int) != expect_val(xv, s, 2)) begin
          failures++;
          if (failures < 10) $display("int scale mismatch x=%0d sel=%0d got %h", xv, s, y_int);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
