// tb_fir_dec: self-checking testbench for fir_dec. 37-tap FIR, decimation by 2, Q1.15 taps, rounded and saturated to 12 bits.
// Random samples (full input range, with random gaps in in_valid) are fed
// in; every output is compared with a direct-form reference convolution
// (tb_ref_pkg), the number of outputs must be one per 2 inputs, and each
// output must appear exactly one clock after the input whose index is a
// multiple of 2.
module tb_fir_dec;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  localparam int IW = 16;
  localparam int OW = 12;
  localparam int D  = 2;
  localparam int N  = 4000;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic signed [IW-1:0] in_data;
  logic out_valid;
  logic signed [OW-1:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_dec #(.ORDER(36), .IN_W(16), .OUT_W(12)) dut (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_data
  );

  lq_t xs, ys, h;
  int  n_in = 0;
  int  expect_valid_next = 0;

  // Rate / latency check: out_valid exactly one clock after every accepted
  // input whose index is a multiple of D, and never otherwise.
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid !== (expect_valid_next != 0)) begin
        failures++;
        $display("FAIL timing: out_valid=%0d expected=%0d at input %0d",
                 out_valid, expect_valid_next, n_in);
      end
      if (out_valid) begin
        ys.push_back(longint'(out_data));
      end
      expect_valid_next = (in_valid && (n_in % D == 0)) ? 1 : 0;
      if (in_valid) n_in++;
    end
  end

  function automatic logic signed [IW-1:0] stim(input int i);
    int r;
    r = $urandom_range(0, 99);
    // runs at the extremes exercise the full word length
    if ((i / 64) % 4 == 1) return {1'b0, {(IW-1){1'b1}}};
    if ((i / 64) % 4 == 3) return {1'b1, {(IW-1){1'b0}}};
    return IW'($urandom);
  endfunction

  initial begin
    lq_t yr;
    rst = 1'b1;
    in_valid = 1'b0;
    in_data = '0;
    for (int k = 0; k <= 36; k++) h.push_back(longint'(fir_coef(k)));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < N; ) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        in_data  = stim(i);
        xs.push_back(longint'(in_data));
        i++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    yr = ref_decim(xs, h, D, 19, 12);
    checks++;
    if (ys.size() != yr.size()) begin
      failures++;
      $display("FAIL count: got %0d outputs, expected %0d", ys.size(), yr.size());
    end
    for (int m = 0; m < yr.size() && m < ys.size(); m++) begin
      checks++;
      if (ys[m] != yr[m]) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] = %0d, expected %0d", m, ys[m], yr[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
