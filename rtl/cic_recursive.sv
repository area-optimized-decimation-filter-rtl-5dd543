// cic_recursive: third decimation stage in the classic recursive
// (integrator-comb) form: H3(z) = ((1 - z^-4)/(1 - z^-1))^3, decimation by
// 4, differential delay 1. It is an alternative to cic_sinc3 with the same
// transfer function and bit-identical output; decim_top selects it with
// CIC_RECURSIVE = 1.
//
// Three integrators run at the input rate; every fourth sample the third
// integrator's value is passed to three first-difference (comb) sections
// that run at the output rate. All registers are OUT_W = IN_W + 3*log2(4)
// bits wide and wrap around on overflow: the integrators overflow as a
// matter of course, but because the final result always fits in OUT_W
// bits, two's-complement wrap-around cancels in the combs and the output is
// exact. The integrators are combinational in their input so the stage has
// no extra delay: on the input with index 4m it registers
// y[m] = sum_k h[k] x[4m-k] (h = 1,3,6,10,12,12,10,6,3,1) and pulses
// out_valid on the next clock, exactly like cic_sinc3.
// The structure and the tolerated wrap-around follow the reference design;
// the zero-delay integrator arrangement and reset are this design's own.
module cic_recursive #(
  parameter int IN_W  = 10,
  parameter int OUT_W = IN_W + 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic [1:0]              phase;            // input index modulo 4
  logic signed [OUT_W-1:0] i1, i2, i3;       // integrator states
  logic signed [OUT_W-1:0] c1_d, c2_d, c3_d; // comb delay registers
  logic signed [OUT_W-1:0] a1, a2, a3, c1, c2, c3;

  always_comb begin
    a1 = i1 + OUT_W'(in_data);   // wrap-around is intended
    a2 = i2 + a1;
    a3 = i3 + a2;
    c1 = a3 - c1_d;
    c2 = c1 - c2_d;
    c3 = c2 - c3_d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      i1        <= '0;
      i2        <= '0;
      i3        <= '0;
      c1_d      <= '0;
      c2_d      <= '0;
      c3_d      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= phase + 2'd1;
        i1    <= a1;
        i2    <= a2;
        i3    <= a3;
        if (phase == 2'd0) begin
          c1_d      <= a3;
          c2_d      <= c1;
          c3_d      <= c2;
          out_data  <= c3;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // A decimating stage never produces outputs on two consecutive clocks.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
