// nr_comb1: first decimation stage, a 4th-order non-recursive comb
// H1(z) = (1 + z^-1)^4 = 1 + 4z^-1 + 6z^-2 + 4z^-3 + z^-4, decimating by 2.
//
// Polyphase form: even-indexed samples feed E0 = 1 + 6z^-1 + z^-2 and
// odd-indexed samples feed E1 = 4 + 4z^-1 (both in terms of the half-rate
// delay), so all arithmetic happens once per two inputs. The constant
// multiplications are shifts and adds (6x = 4x + 2x, 4x = x << 2).
//
// Interface: one input sample per clock with in_valid high. The first
// sample after reset has index 0. For every even-indexed input x[2m] the
// stage registers y[m] = x[2m] + 4x[2m-1] + 6x[2m-2] + 4x[2m-3] + x[2m-4],
// raising out_valid on the following clock (one clock latency). The DC gain
// is 16, so OUT_W = IN_W + 4 bits hold every result exactly.
// Polyphase realisation and filter order follow the reference design; the
// phase convention, reset and word length are this design's choices.
module nr_comb1 #(
  parameter int IN_W  = 3,
  parameter int OUT_W = IN_W + 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic                   phase;      // 0: next sample is even-indexed
  logic signed [IN_W-1:0] odd_cur;    // x[2m-1]
  logic signed [IN_W-1:0] odd_prev;   // x[2m-3]
  logic signed [IN_W-1:0] even_d1;    // x[2m-2]
  logic signed [IN_W-1:0] even_d2;    // x[2m-4]

  logic signed [OUT_W-1:0] x0, xo1, xe1, xo3, xe2, e0, e1;

  always_comb begin
    x0  = OUT_W'(in_data);
    xe1 = OUT_W'(even_d1);
    xe2 = OUT_W'(even_d2);
    xo1 = OUT_W'(odd_cur);
    xo3 = OUT_W'(odd_prev);
    e0  = x0 + (xe1 <<< 2) + (xe1 <<< 1) + xe2;   // 1 + 6z^-1 + z^-2
    e1  = (xo1 + xo3) <<< 2;                      // 4 + 4z^-1
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      odd_cur   <= '0;
      odd_prev  <= '0;
      even_d1   <= '0;
      even_d2   <= '0;
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
          even_d2   <= even_d1;
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
