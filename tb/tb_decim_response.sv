// tb_decim_response: frequency-response test of the complete decimation
// filter (default configuration, OSR 128) driven by the behavioural
// 3rd-order modulator.
//
// For each tone the modulator input is a 0.45-step sine; after 100 output
// samples of settling, a 512-point single-bin DFT of the 12-bit output
// measures the amplitude at the frequency where the tone lands after
// decimation. Tone frequencies are k/512 of the output rate fo (passband
// tones) or an image m*fo +- k/512*fo that folds onto bin k (alias tones).
// Gains are reported relative to the ideal passband amplitude
// 0.45 * 2048/4 = 230.4 LSB. Checks: passband gain within +-0.5 dB up to
// 0.2 fo and within +-1 dB at 0.4 fo; every alias tone at least 40 dB
// down. The thresholds are this design's own targets: the reference design
// states no passband ripple or stopband attenuation.
module tb_decim_response;
  import decim_pkg::*;

  localparam int NFFT   = 512;
  localparam int SETTLE = 100;
  localparam real PI    = 3.14159265358979;
  localparam real AMP   = 0.45;

  logic clk = 1'b0;
  logic rst;
  logic in_valid, mod_en;
  logic signed [2:0]  mod_y;
  logic out_valid;
  logic signed [11:0] out_data;
  real  ain;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sd_modulator_model u_mod (.clk, .rst, .en(mod_en), .ain, .y(mod_y));

  decim_top dut (
    .clk, .rst, .osr_sel(OSR128), .in_valid, .in_data(mod_y),
    .out_valid, .out_data
  );

  int  n_out;
  real yv [SETTLE + NFFT];

  always @(posedge clk)
    if (!rst && out_valid) begin
      if (n_out < SETTLE + NFFT) yv[n_out] = real'(out_data);
      n_out++;
    end

  // Run one tone of `cyc_per_out` cycles per output sample (input rate is
  // 128 samples per output) and return the gain in dB at output bin k.
  task automatic tone(input real cyc_per_out, input int k, output real gdb,
                     output real amp);
    real re, im, a;
    rst = 1'b1;
    in_valid = 1'b0;
    mod_en = 1'b0;
    n_out = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; n_out < SETTLE + NFFT; i++) begin
      @(negedge clk);
      ain      = -0.5 + AMP * $sin(2.0 * PI * cyc_per_out * i / 128.0);
      mod_en   = 1'b1;
      in_valid = (i > 0);
    end
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < NFFT; n++) begin
      re += yv[SETTLE + n] * $cos(2.0 * PI * k * n / NFFT);
      im -= yv[SETTLE + n] * $sin(2.0 * PI * k * n / NFFT);
    end
    a   = 2.0 * $sqrt(re * re + im * im) / NFFT;
    if (a < 1.0e-6) a = 0.0;   // DFT round-off of a constant output
    amp = a;
    gdb = (a > 0.0) ? 20.0 * $log10(a / (AMP * 512.0)) : -999.0;
  endtask

  initial begin
    real g, a, worst_alias;
    int  kp [3] = '{26, 102, 205};
    real tol [3] = '{0.5, 0.5, 1.0};
    // images that fold onto bin 51 (0.0996 fo)
    real am [6] = '{1.0 - 51.0/512, 2.0 - 51.0/512, 4.0 - 51.0/512,
                    8.0 + 51.0/512, 32.0 - 51.0/512, 1.0 - 205.0/512};
    int  ak [6] = '{51, 51, 51, 51, 51, 205};
    worst_alias = -999.0;
    for (int t = 0; t < 3; t++) begin
      tone(real'(kp[t]) / NFFT, kp[t], g, a);
      checks++;
      $display("passband %0.4f fo: gain %0.2f dB", real'(kp[t]) / NFFT, g);
      if (g > tol[t] || g < -tol[t]) begin
        failures++;
        $display("FAIL passband gain out of +-%0.1f dB", tol[t]);
      end
    end
    for (int t = 0; t < 6; t++) begin
      tone(am[t], ak[t], g, a);
      checks++;
      if (a > 0.0)
        $display("alias tone %0.4f fo -> %0.4f fo: %0.1f dB (%0.3f LSB)",
                 am[t], real'(ak[t]) / NFFT, g, a);
      else
        $display("alias tone %0.4f fo -> %0.4f fo: no output (below 1/2 LSB)",
                 am[t], real'(ak[t]) / NFFT);
      if (g > worst_alias) worst_alias = g;
      if (g > -40.0) begin
        failures++;
        $display("FAIL alias rejection below 40 dB");
      end
    end
    if (worst_alias > -999.0) $display("worst alias %0.1f dB", worst_alias);
    else $display("no alias tone reached the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
