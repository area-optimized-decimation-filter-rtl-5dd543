// tb_decim_top: end-to-end testbench of the complete decimation filter at
// its default configuration.
//
// Segments, each started from a flushed filter:
//   1. OSR 128: a sine from the behavioural 3rd-order modulator, 256 output
//      periods. Besides the bit-exact check, the output swing must match
//      the input amplitude (an ADC-level sanity check).
//   2. switch to OSR 64 (nr_comb2 bypassed): modulator sine, with random
//      gaps in in_valid.
//   3. switch to OSR 32 (cic_sinc3 bypassed): modulator sine.
//   4. back to OSR 128: full-scale steps (+3 / -4) that drive the halfband
//      and FIR outputs into saturation.
// In every segment each output is compared with a chain of direct-form
// reference convolutions (tb_ref_pkg) with the same rounding, the output
// count must equal ceil(inputs / decimation), and output spacing checks the
// rate. Counted mechanisms: each of the three OSR modes, mode switches
// (flushes), bypass paths taken, and saturation events in the halfband /
// FIR stages; one that never occurs counts as a failure.
module tb_decim_top;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  logic clk = 1'b0;
  logic rst;
  osr_e osr_sel;
  logic in_valid;
  logic signed [2:0]  in_data, mod_y;
  logic out_valid;
  logic signed [11:0] out_data;
  logic mod_en, use_mod;
  logic signed [2:0] direct_data;
  real  ain;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sd_modulator_model u_mod (
    .clk, .rst, .en(mod_en), .ain, .y(mod_y)
  );

  decim_top dut (
    .clk, .rst, .osr_sel, .in_valid, .in_data, .out_valid, .out_data
  );

  // The modulator output of the previous clock is the filter input.
  assign in_data = use_mod ? mod_y : direct_data;

  lq_t xs, ys;
  int  mode_count [3];
  int  switch_count = 0, bypass64 = 0, bypass32 = 0, sat_count = 0;
  int  out_gap_bad = 0, last_out_in = -1, n_in = 0, seg_decim = 128;
  int  trig, lat_max = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) begin
        xs.push_back(longint'(in_data));
        n_in++;
      end
      if (out_valid) begin
        ys.push_back(longint'(out_data));
        // The output belongs to the last input whose index is a multiple of
        // the decimation; successive outputs must be one period apart and
        // arrive within 7 inputs of their trigger (pipeline latency 6).
        trig = ((n_in - 1) / seg_decim) * seg_decim;
        if (last_out_in >= 0 && trig - last_out_in != seg_decim) out_gap_bad++;
        if (n_in - 1 - trig > 7) out_gap_bad++;
        last_out_in = trig;
        lat_max = (n_in - 1 - trig > lat_max) ? n_in - 1 - trig : lat_max;
      end
      if (dut.cic_in_v && dut.osr_q == OSR64) bypass64++;
      if (dut.u_hbf1.in_valid && dut.osr_q == OSR32) bypass32++;
      if (dut.u_hbf1.out_valid &&
          (dut.u_hbf1.out_data == 16'sh7fff || dut.u_hbf1.out_data == -16'sh8000))
        sat_count++;
      if (out_valid && (out_data == 12'sh7ff || out_data == -12'sh800))
        sat_count++;
    end
  end

  function automatic lq_t scale(input lq_t x, input int sh);
    lq_t y;
    y = {};
    foreach (x[i]) y.push_back(x[i] <<< sh);
    return y;
  endfunction

  function automatic lq_t ref_chain(input lq_t x, input osr_e mode);
    lq_t a, hb1, hb2, fir;
    a = ref_decim(x, binom(4), 2, 0, 0);
    if (mode == OSR128) begin
      a = ref_decim(a, binom(3), 2, 0, 0);
      a = ref_decim(a, boxcar_pow(4, 3), 4, 0, 0);
    end else if (mode == OSR64) begin
      a = ref_decim(scale(a, 3), boxcar_pow(4, 3), 4, 0, 0);
    end else begin
      a = scale(ref_decim(a, binom(3), 2, 0, 0), 6);
    end
    hb1 = {}; hb2 = {}; fir = {};
    for (int k = 0; k <= 6; k++)  hb1.push_back(longint'(hbf_coef(6, k)));
    for (int k = 0; k <= 14; k++) hb2.push_back(longint'(hbf_coef(14, k)));
    for (int k = 0; k <= 36; k++) fir.push_back(longint'(fir_coef(k)));
    a = ref_decim(a, hb1, 2, 15, 16);
    a = ref_decim(a, hb2, 2, 15, 16);
    a = ref_decim(a, fir, 2, 19, 12);
    return a;
  endfunction

  // Start a segment: set the mode, wait out the flush, clear the logs.
  task automatic start_segment(input osr_e mode);
    @(negedge clk);
    in_valid = 1'b0;
    mod_en   = 1'b0;
    if (mode != osr_sel) switch_count++;
    osr_sel = mode;
    seg_decim = (mode == OSR128) ? 128 : (mode == OSR64) ? 64 : 32;
    repeat (4) @(negedge clk);
    xs = {}; ys = {};
    n_in = 0; last_out_in = -1; out_gap_bad = 0;
  endtask

  // Compare the segment's outputs with the reference chain.
  task automatic end_segment(input osr_e mode, input string name);
    lq_t yr;
    @(negedge clk);
    in_valid = 1'b0;
    mod_en   = 1'b0;
    repeat (20) @(negedge clk);
    yr = ref_chain(xs, mode);
    checks++;
    if (ys.size() != yr.size() || ys.size() == 0) begin
      failures++;
      $display("FAIL %s: %0d outputs, expected %0d", name, ys.size(), yr.size());
    end
    checks++;
    if (out_gap_bad != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs off the 1/%0d rate", name, out_gap_bad, seg_decim);
    end
    for (int m = 0; m < yr.size() && m < ys.size(); m++) begin
      checks++;
      if (ys[m] != yr[m]) begin
        failures++;
        if (failures < 10) $display("FAIL %s y[%0d]=%0d expected %0d", name, m, ys[m], yr[m]);
      end
    end
    mode_count[mode]++;
    $display("%s: %0d inputs, %0d outputs", name, xs.size(), ys.size());
  endtask

  // Drive n modulator samples of a sine with the given period (in input
  // samples); optional random gaps in in_valid.
  task automatic run_sine(input int n, input int period, input bit gaps);
    use_mod = 1'b1;
    for (int i = 0; i < n; ) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        mod_en   = 1'b0;
      end else begin
        ain      = -0.5 + 0.45 * $sin(2.0 * 3.14159265358979 * i / period);
        mod_en   = 1'b1;
        // the sample the modulator produced on the previous enabled clock
        in_valid = (i > 0);
        i++;
      end
    end
  endtask

  initial begin
    int lo, hi;
    rst = 1'b1;
    osr_sel = OSR128;
    in_valid = 1'b0;
    mod_en = 1'b0;
    use_mod = 1'b1;
    direct_data = '0;
    ain = -0.5;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);

    // 1. OSR 128, 64 output periods of 20 samples = 163840 inputs
    start_segment(OSR128);
    run_sine(128 * 20 * 64, 128 * 20, 1'b0);
    end_segment(OSR128, "osr128_sine");
    // ADC-level check: swing after settling ~ 2 * 0.45 * 512 LSB = 460
    lo = 4096; hi = -4096;
    for (int m = 200; m < ys.size(); m++) begin
      if (ys[m] < lo) lo = int'(ys[m]);
      if (ys[m] > hi) hi = int'(ys[m]);
    end
    checks++;
    if (hi - lo < 420 || hi - lo > 500) begin
      failures++;
      $display("FAIL osr128 sine swing %0d (expected about 460)", hi - lo);
    end else $display("osr128 sine swing %0d LSB (ideal 460)", hi - lo);

    // 2. OSR 64 with gaps
    start_segment(OSR64);
    run_sine(64 * 16 * 32, 64 * 16, 1'b1);
    end_segment(OSR64, "osr64_sine_gaps");

    // 3. OSR 32
    start_segment(OSR32);
    run_sine(32 * 16 * 32, 32 * 16, 1'b0);
    end_segment(OSR32, "osr32_sine");

    // 4. back to OSR 128, full-scale steps to force saturation
    start_segment(OSR128);
    use_mod = 1'b0;
    for (int i = 0; i < 128 * 200; i++) begin
      @(negedge clk);
      direct_data = ((i / 4096) % 2 == 0) ? 3'sd3 : -3'sd4;
      in_valid = 1'b1;
    end
    end_segment(OSR128, "osr128_steps");

    // mechanisms
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (mode_count[k] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", k);
      end
    end
    checks += 4;
    if (switch_count < 3) begin failures++; $display("FAIL too few mode switches"); end
    if (bypass64 == 0)    begin failures++; $display("FAIL nr_comb2 bypass never used"); end
    if (bypass32 == 0)    begin failures++; $display("FAIL cic_sinc3 bypass never used"); end
    if (sat_count == 0)   begin failures++; $display("FAIL saturation never happened"); end
    $display("mechanisms: modes 128/64/32 = %0d/%0d/%0d, switches %0d, bypass64 %0d, bypass32 %0d, saturations %0d",
             mode_count[0], mode_count[1], mode_count[2], switch_count, bypass64, bypass32, sat_count);
    $display("largest input-to-output latency: %0d input samples", lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
