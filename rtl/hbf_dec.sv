// hbf_dec: halfband lowpass filter with decimation by 2, in transposed
// polyphase form (used twice: ORDER = 6 for HBF I, ORDER = 14 for HBF II).
//
// A halfband filter of order 4K+2 has every tap at an even distance from
// the centre equal to zero and a centre tap of exactly 1/2. Split into
// polyphase branches this leaves
//   * an even branch with the 2K+2 non-zero outer taps, fed by the
//     even-indexed inputs, built in transposed direct form: each new even
//     sample is multiplied by every tap and the products are added into a
//     chain of partial-sum registers. Because the taps are symmetric only
//     K+1 products are formed (shift-add CSD multipliers) and each is used
//     twice;
//   * an odd branch that is a pure delay of K half-rate samples followed by
//     a multiplication by 1/2 (a wire shift).
// Everything runs once per two inputs.
//
// Interface: valid-strobed samples, first sample after reset has index 0.
// On every even-indexed input x[2m] the stage registers
// y[m] = round(sum_k h[k] x[2m-k]) with h in Q1.15 and pulses out_valid on
// the next clock. The result is rounded to nearest (ties towards +inf) and
// saturated to OUT_W bits. Orders and the transposed polyphase structure
// follow the reference design; the coefficients (decim_pkg), rounding and
// saturation are this design's own.
module hbf_dec
  import decim_pkg::*;
#(
  parameter int ORDER = 6,
  parameter int IN_W  = 16,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int K     = (ORDER - 2) / 4;   // odd-branch delay
  localparam int NE    = ORDER / 2 + 1;     // even-branch taps
  localparam int NU    = NE / 2;            // distinct even-branch taps
  localparam int PW    = IN_W + COEF_W;     // product width
  localparam int ACC_W = PW + 2;            // partial-sum width

  initial assert (ORDER % 4 == 2) else $error("halfband ORDER must be 4K+2");

  logic                   phase;              // 0: next sample even-indexed
  logic signed [IN_W-1:0] odd_sr [K+1];       // odd samples, newest first
  logic signed [ACC_W-1:0] s [NE-1];          // transposed partial sums
  logic signed [PW-1:0]   prod [NU];

  for (genvar u = 0; u < NU; u++) begin : g_mul
    csd_mult #(.IN_W(IN_W), .COEF(hbf_coef(ORDER, 2*u))) u_mul (
      .x(in_data), .p(prod[u])
    );
  end

  function automatic int mirror(input int i);
    return (i < NE - 1 - i) ? i : NE - 1 - i;
  endfunction

  logic signed [ACC_W-1:0] acc, rnd;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((2**(OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2**(OUT_W-1));

  always_comb begin
    acc = ACC_W'(prod[0]) + s[0]
        + (ACC_W'(odd_sr[K]) <<< (COEF_FRAC - 1));
    rnd = (acc + ACC_W'(2**(COEF_FRAC-1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i <= K; i++)  odd_sr[i] <= '0;
      for (int i = 0; i < NE-1; i++) s[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          for (int i = 0; i < NE-2; i++)
            s[i] <= ACC_W'(prod[mirror(i+1)]) + s[i+1];
          s[NE-2] <= ACC_W'(prod[mirror(NE-1)]);
          out_valid <= 1'b1;
          if (rnd > MAXV)      out_data <= OUT_W'(MAXV);
          else if (rnd < MINV) out_data <= OUT_W'(MINV);
          else                 out_data <= OUT_W'(rnd);
        end else begin
          odd_sr[0] <= in_data;
          for (int i = 1; i <= K; i++) odd_sr[i] <= odd_sr[i-1];
        end
      end
    end
  end

  // A decimating stage never produces outputs on two consecutive clocks.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
