// csd_mult: multiplies a signed sample by a constant coefficient using only
// shifts and adds.
//
// The coefficient is recoded at elaboration into canonical signed digits
// (digits -1, 0, +1 with no two neighbours non-zero); every +1 digit adds the
// shifted input and every -1 digit subtracts it. The multiplier is purely
// combinational: p = x * COEF exactly, with IN_W + COEF_W bits so no product
// of a COEF_W-bit signed constant can overflow. Shift-and-add multiplication
// of CSD coefficients is the reference design's method; the recoding
// function lives in decim_pkg.
module csd_mult
  import decim_pkg::*;
#(
  parameter int IN_W = 16,
  parameter int COEF = 9724
) (
  input  logic signed [IN_W-1:0]        x,
  output logic signed [IN_W+COEF_W-1:0] p
);

  localparam int PW = IN_W + COEF_W;
  localparam logic [COEF_W:0] POS = csd_digits(COEF, 1'b0);
  localparam logic [COEF_W:0] NEG = csd_digits(COEF, 1'b1);

  logic signed [PW-1:0] xe;
  assign xe = PW'(x);

  always_comb begin
    p = '0;
    for (int i = 0; i <= COEF_W; i++) begin
      if (POS[i]) p = p + (xe <<< i);
      if (NEG[i]) p = p - (xe <<< i);
    end
  end

endmodule
