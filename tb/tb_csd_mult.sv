// tb_csd_mult: self-checking testbench for csd_mult. Instantiates the
// shift-add multiplier for a set of constants (every distinct halfband tap,
// the larger FIR taps, and edge cases such as +-1, 0, 2^15-1, -2^15 and the
// alternating patterns 0x5555 / 0xAAAA that need the most CSD digits) and
// compares each product with the built-in multiplication for every 16-bit
// input value.
module tb_csd_mult;
  localparam int IN_W = 16;
  localparam int NC   = 16;
  localparam int CS [NC] = '{9724, -1532, 10055, -2497, 766, -132, 16052,
                             -3241, 16384, 32767, -32768, 21845, -21846,
                             1, -1, 0};

  logic signed [IN_W-1:0]    x;
  logic signed [IN_W+15:0]   p [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    csd_mult #(.IN_W(IN_W), .COEF(CS[c])) dut (.x(x), .p(p[c]));
  end

  initial begin
    for (int v = -(2**(IN_W-1)); v < 2**(IN_W-1); v++) begin
      x = IN_W'(v);
      #1;
      for (int c = 0; c < NC; c++) begin
        longint expv;
        expv = longint'(v) * longint'(CS[c]);
        checks++;
        if (longint'(p[c]) != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d coef=%0d: got %0d expected %0d", v, CS[c], p[c], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
