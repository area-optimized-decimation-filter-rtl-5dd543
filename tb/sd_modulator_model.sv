// sd_modulator_model: behavioural (not synthesizable) model of a 3rd-order
// sigma-delta modulator with a 3-bit output, used only as a stimulus source.
//
// Error-feedback form: v = u - 3e[n-1] + 3e[n-2] - e[n-3], y = round(v)
// limited to the eight levels -4..+3, e = y - v, so that
// Y(z) = U(z) + (1 - z^-1)^3 E(z): the quantisation error is shaped by a
// third-order highpass. The analog input `ain` is in units of one output
// step. With the input kept inside -0.95..-0.05 the internal value never
// leaves -4.45..3.45, the quantiser never clips, |e| <= 0.5 and the loop
// is unconditionally stable. A new output is produced on every clock with
// en high; rst clears the error history.
module sd_modulator_model (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  real               ain,
  output logic signed [2:0] y
);
  real e1, e2, e3;

  always @(posedge clk) begin
    real v, q, e;
    if (rst) begin
      e1 = 0.0; e2 = 0.0; e3 = 0.0;
      y <= '0;
    end else if (en) begin
      v = ain - 3.0 * e1 + 3.0 * e2 - e3;
      q = $floor(v + 0.5);
      if (q > 3.0)  q = 3.0;
      if (q < -4.0) q = -4.0;
      e = q - v;
      e3 = e2; e2 = e1; e1 = e;
      y <= 3'($rtoi(q));
    end
  end
endmodule
