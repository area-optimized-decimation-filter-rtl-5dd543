// nr_comb2: second decimation stage, a 3rd-order non-recursive comb
// H2(z) = (1 + z^-1)^3 = 1 + 3z^-1 + 3z^-2 + z^-3, decimating by 2.
//
// Polyphase form: even-indexed samples feed E0 = 1 + 3z^-1 and odd-indexed
// samples feed E1 = 3 + z^-1 (delays at the half rate); the products by 3
// are x + 2x. Arithmetic runs once per two input samples.
//
// Interface: valid-strobed samples; the first sample after reset has index
// 0. On each even-indexed input x[2m] the stage registers
// y[m] = x[2m] + 3x[2m-1] + 3x[2m-2] + x[2m-3] and pulses out_valid on the
// next clock. DC gain 8, so OUT_W = IN_W + 3 bits are exact.
// Filter order and polyphase realisation follow the reference design; phase
// convention, reset and word length are this design's choices.
module nr_comb2 #(
  parameter int IN_W  = 7,
  parameter int OUT_W = IN_W + 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic                   phase;     // 0: next sample is even-indexed
  logic signed [IN_W-1:0] odd_cur;   // x[2m-1]
  logic signed [IN_W-1:0] odd_prev;  // x[2m-3]
  logic signed [IN_W-1:0] even_d1;   // x[2m-2]

  logic signed [OUT_W-1:0] x0, xe1, xo1, xo3, e0, e1;

  always_comb begin
    x0  = OUT_W'(in_data);
    xe1 = OUT_W'(even_d1);
    xo1 = OUT_W'(odd_cur);
    xo3 = OUT_W'(odd_prev);
    e0  = x0 + (xe1 <<< 1) + xe1;    // 1 + 3z^-1
    e1  = (xo1 <<< 1) + xo1 + xo3;   // 3 + z^-1
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      odd_cur   <= '0;
      odd_prev  <= '0;
      even_d1   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          out_data  <= e0 + e1;
          out_valid <= 1'b1;
          even_d1   <= in_data;
        end else begin
          odd_cur  <= in_data;
          odd_prev <= odd_cur;
        end
      end
    end
  end

  // A decimating stage never produces outputs on two consecutive clocks.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
