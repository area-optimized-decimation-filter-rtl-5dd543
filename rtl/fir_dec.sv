// fir_dec: final stage, a 36th-order (37-tap) linear-phase lowpass FIR with
// decimation by 2 that also flattens the passband droop of the comb stages.
//
// The filter is split into two polyphase branches, both in transposed
// direct form: the even branch (taps h[0], h[2], ..., h[36], 19 taps) is
// fed by even-indexed inputs and the odd branch (h[1], ..., h[35], 18
// taps) by odd-indexed inputs. Both branches are symmetric, so only 10 + 9
// distinct products are formed, each by a shift-add CSD multiplier, and
// each is added into two partial-sum registers. The odd branch's result is
// held from the odd input until the following even input, where the two
// branch results are added.
//
// Interface: valid-strobed 16-bit samples, first sample after reset has
// index 0. On every even-indexed input x[2m] the stage registers
// y[m] = round(sum_k h[k] x[2m-k] / 2^(15 + IN_W - OUT_W)), saturated to
// OUT_W = 12 bits, and pulses out_valid one clock later. Order, decimation
// factor, CSD shift-add multiplication and the 12-bit output follow the
// reference design; the coefficients (decim_pkg), rounding and saturation
// are this design's own.
module fir_dec
  import decim_pkg::*;
#(
  parameter int ORDER = 36,
  parameter int IN_W  = 16,
  parameter int OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int NE    = ORDER / 2 + 1;        // even-branch taps
  localparam int NO    = ORDER / 2;            // odd-branch taps
  localparam int NUE   = (NE + 1) / 2;         // distinct even taps
  localparam int NUO   = (NO + 1) / 2;         // distinct odd taps
  localparam int PW    = IN_W + COEF_W;
  localparam int ACC_W = PW + 3;
  localparam int SHIFT = COEF_FRAC + IN_W - OUT_W;

  initial assert (ORDER % 2 == 0 && ORDER <= 36)
    else $error("fir_dec: ORDER must be even and at most 36");

  logic                    phase;
  logic signed [PW-1:0]    pe [NUE];
  logic signed [PW-1:0]    po [NUO];
  logic signed [ACC_W-1:0] se [NE-1];
  logic signed [ACC_W-1:0] so [NO-1];
  logic signed [ACC_W-1:0] odd_hold;          // odd-branch output

  // Taps are centred in the 37-tap table so a shorter ORDER stays symmetric.
  localparam int OFS = (36 - ORDER) / 2;

  for (genvar u = 0; u < NUE; u++) begin : g_mul_e
    csd_mult #(.IN_W(IN_W), .COEF(fir_coef(OFS + 2*u))) u_mul (
      .x(in_data), .p(pe[u])
    );
  end
  for (genvar u = 0; u < NUO; u++) begin : g_mul_o
    csd_mult #(.IN_W(IN_W), .COEF(fir_coef(OFS + 2*u + 1))) u_mul (
      .x(in_data), .p(po[u])
    );
  end

  function automatic int mir(input int i, input int n);
    return (i < n - 1 - i) ? i : n - 1 - i;
  endfunction

  logic signed [ACC_W-1:0] acc, rnd;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((2**(OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2**(OUT_W-1));

  always_comb begin
    acc = ACC_W'(pe[0]) + se[0] + odd_hold;
    rnd = (acc + ACC_W'(2**(SHIFT-1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      odd_hold  <= '0;
      for (int i = 0; i < NE-1; i++) se[i] <= '0;
      for (int i = 0; i < NO-1; i++) so[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          for (int i = 0; i < NE-2; i++)
            se[i] <= ACC_W'(pe[mir(i+1, NE)]) + se[i+1];
          se[NE-2] <= ACC_W'(pe[mir(NE-1, NE)]);
          out_valid <= 1'b1;
          if (rnd > MAXV)      out_data <= OUT_W'(MAXV);
          else if (rnd < MINV) out_data <= OUT_W'(MINV);
          else                 out_data <= OUT_W'(rnd);
        end else begin
          odd_hold <= ACC_W'(po[0]) + so[0];
          for (int i = 0; i < NO-2; i++)
            so[i] <= ACC_W'(po[mir(i+1, NO)]) + so[i+1];
          so[NO-2] <= ACC_W'(po[mir(NO-1, NO)]);
        end
      end
    end
  end

  // A decimating stage never produces outputs on two consecutive clocks.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
