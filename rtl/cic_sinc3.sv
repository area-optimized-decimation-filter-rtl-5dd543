// cic_sinc3: third decimation stage, a 3rd-order sinc (comb) filter
// H3(z) = ((1 - z^-4)/(1 - z^-1))^3, decimating by 4, built without
// integrators as a non-recursive polyphase filter.
//
// The impulse response 1,3,6,10,12,12,10,6,3,1 is split into four branches
// (delays at the quarter rate):
//   E0 = 1 + 12z^-1 + 3z^-2   fed by x[4m]
//   E1 = 3 + 12z^-1 +  z^-2   fed by x[4m-1]
//   E2 = 6 + 10z^-1           fed by x[4m-2]
//   E3 = 10 + 6z^-1           fed by x[4m-3]
// Only the three input registers that form the commutator run at the input
// rate; the branch histories and the adder tree change once per four
// inputs. There is no recursive loop, so no long carry chain closes a
// feedback path, and all constant products are shifts and adds.
//
// Interface: valid-strobed samples; the first sample after reset has index
// 0, and on every input with index 4m the stage registers
// y[m] = sum_k h[k] x[4m-k] and pulses out_valid one clock later. DC gain is
// 64, so OUT_W = IN_W + 6 bits are exact. The transfer function, the
// polyphase split and the three fast registers follow the reference
// design; phase convention, reset and word lengths are this design's own.
module cic_sinc3 #(
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

  logic [1:0]             phase;           // input index modulo 4
  logic signed [IN_W-1:0] d1, d2, d3;      // input-rate delay line
  logic signed [IN_W-1:0] b0_1, b0_2;      // x[4m-4], x[4m-8]
  logic signed [IN_W-1:0] b1_1, b1_2;      // x[4m-5], x[4m-9]
  logic signed [IN_W-1:0] b2_1;            // x[4m-6]
  logic signed [IN_W-1:0] b3_1;            // x[4m-7]

  logic signed [OUT_W-1:0] a0, a1, a2, a3, p01, p02, p11, p12, p21, p31;
  logic signed [OUT_W-1:0] e0, e1, e2, e3;

  always_comb begin
    a0  = OUT_W'(in_data);
    a1  = OUT_W'(d1);
    a2  = OUT_W'(d2);
    a3  = OUT_W'(d3);
    p01 = OUT_W'(b0_1);
    p02 = OUT_W'(b0_2);
    p11 = OUT_W'(b1_1);
    p12 = OUT_W'(b1_2);
    p21 = OUT_W'(b2_1);
    p31 = OUT_W'(b3_1);
    e0  = a0 + (p01 <<< 3) + (p01 <<< 2) + (p02 <<< 1) + p02;  // 1 12 3
    e1  = (a1 <<< 1) + a1 + (p11 <<< 3) + (p11 <<< 2) + p12;   // 3 12 1
    e2  = (a2 <<< 2) + (a2 <<< 1) + (p21 <<< 3) + (p21 <<< 1); // 6 10
    e3  = (a3 <<< 3) + (a3 <<< 1) + (p31 <<< 2) + (p31 <<< 1); // 10 6
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      d1        <= '0;
      d2        <= '0;
      d3        <= '0;
      b0_1      <= '0;
      b0_2      <= '0;
      b1_1      <= '0;
      b1_2      <= '0;
      b2_1      <= '0;
      b3_1      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= phase + 2'd1;
        d1    <= in_data;
        d2    <= d1;
        d3    <= d2;
        if (phase == 2'd0) begin
          out_data  <= e0 + e1 + e2 + e3;
          out_valid <= 1'b1;
          b0_1 <= in_data;
          b0_2 <= b0_1;
          b1_1 <= d1;
          b1_2 <= b1_1;
          b2_1 <= d2;
          b3_1 <= d3;
        end
      end
    end
  end

  // A decimating stage never produces outputs on two consecutive clocks.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
