// decim_top: six-stage decimation filter for a 3rd-order, 3-bit
// sigma-delta modulator. It lowers the sample rate by 128 (or 64 / 32) and
// delivers 12-bit samples.
//
// Chain (decimation in brackets):
//   nr_comb1  (1+z^-1)^4, non-recursive polyphase       [2]
//   nr_comb2  (1+z^-1)^3, non-recursive polyphase       [2]
//   cic_sinc3 sinc^3 of length 4, polyphase             [4]
//   hbf_dec   halfband, order 6  (HBF I)                [2]
//   hbf_dec   halfband, order 14 (HBF II)               [2]
//   fir_dec   37-tap lowpass / droop equaliser          [2]
// The comb section (first three stages) removes most of the shaped
// quantisation noise with adders only and has gain 2^13, so 3-bit input
// becomes a full-scale 16-bit word. The halfband and FIR stages sharpen the
// transition band at the low rates, and the FIR rounds to 12 bits.
//
// The sinc3 stage exists in two forms with identical output: the
// non-recursive polyphase filter (default) and the recursive
// integrator-comb filter (CIC_RECURSIVE = 1), whose integrators wrap around.
//
// osr_sel shortens the comb section for modulators with a lower
// oversampling ratio: OSR64 bypasses nr_comb2 (total decimation 64), OSR32
// bypasses cic_sinc3 (total 32). The first, 4th-order stage is always
// used. A bypassed path is shifted left by the gain of the skipped stage so
// every mode reaches HBF I at the same 16-bit full scale. A change of
// osr_sel is registered and flushes every stage for one clock, so the
// new mode starts from empty filters.
//
// Interface and timing: one clock at the modulator rate; in_valid marks
// modulator samples (normally high every clock). out_valid pulses once per
// 128 (64, 32) accepted inputs; out_data is two's complement, where
// +2047 is just under the modulator's positive full scale of +4.
// Stage order, orders and factors, the 3-bit input, 12-bit output and the
// 32/64/128 OSR choice follow the reference design; the bypass scheme,
// word lengths, rounding and flush on mode change are this design's own.
module decim_top
  import decim_pkg::*;
#(
  // 0: sinc3 stage as the non-recursive polyphase filter (cic_sinc3);
  // 1: as the recursive integrator-comb filter (cic_recursive).
  parameter bit CIC_RECURSIVE = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst,
  input  osr_e                        osr_sel,
  input  logic                        in_valid,
  input  logic signed [SD_W-1:0]      in_data,
  output logic                        out_valid,
  output logic signed [DEC_OUT_W-1:0] out_data
);

  osr_e osr_q;
  logic flush_q, srst;

  always_ff @(posedge clk) begin
    if (rst) begin
      osr_q   <= osr_sel;
      flush_q <= 1'b1;
    end else begin
      osr_q   <= osr_sel;
      flush_q <= (osr_sel != osr_q);
    end
  end

  assign srst = rst | flush_q;

  // ---------------- comb section ----------------
  logic                     nr1_v, nr2_v, cic_v, nr2_in_v, cic_in_v;
  logic signed [NR1_W-1:0]  nr1_d;
  logic signed [NR2_W-1:0]  nr2_d, cic_in_d;
  logic signed [CIC_W-1:0]  cic_d;
  logic                     hb1_in_v;
  logic signed [DATA_W-1:0] hb1_in_d;

  nr_comb1 #(.IN_W(SD_W), .OUT_W(NR1_W)) u_nr1 (
    .clk, .rst(srst), .in_valid, .in_data,
    .out_valid(nr1_v), .out_data(nr1_d)
  );

  assign nr2_in_v = nr1_v && (osr_q != OSR64);

  nr_comb2 #(.IN_W(NR1_W), .OUT_W(NR2_W)) u_nr2 (
    .clk, .rst(srst), .in_valid(nr2_in_v), .in_data(nr1_d),
    .out_valid(nr2_v), .out_data(nr2_d)
  );

  always_comb begin
    if (osr_q == OSR64) begin
      cic_in_v = nr1_v;
      cic_in_d = NR2_W'(nr1_d) <<< 3;           // gain of the skipped stage
    end else begin
      cic_in_v = nr2_v && (osr_q == OSR128);
      cic_in_d = nr2_d;
    end
  end

  if (CIC_RECURSIVE) begin : g_cic_rec
    cic_recursive #(.IN_W(NR2_W), .OUT_W(CIC_W)) u_cic (
      .clk, .rst(srst), .in_valid(cic_in_v), .in_data(cic_in_d),
      .out_valid(cic_v), .out_data(cic_d)
    );
  end else begin : g_cic_poly
    cic_sinc3 #(.IN_W(NR2_W), .OUT_W(CIC_W)) u_cic (
      .clk, .rst(srst), .in_valid(cic_in_v), .in_data(cic_in_d),
      .out_valid(cic_v), .out_data(cic_d)
    );
  end

  always_comb begin
    if (osr_q == OSR32) begin
      hb1_in_v = nr2_v;
      hb1_in_d = DATA_W'(nr2_d) <<< 6;          // gain of the skipped stage
    end else begin
      hb1_in_v = cic_v;
      hb1_in_d = DATA_W'(cic_d);
    end
  end

  // ---------------- halfband and FIR section ----------------
  logic                     hb1_v, hb2_v;
  logic signed [DATA_W-1:0] hb1_d, hb2_d;

  hbf_dec #(.ORDER(6), .IN_W(DATA_W), .OUT_W(DATA_W)) u_hbf1 (
    .clk, .rst(srst), .in_valid(hb1_in_v), .in_data(hb1_in_d),
    .out_valid(hb1_v), .out_data(hb1_d)
  );

  hbf_dec #(.ORDER(14), .IN_W(DATA_W), .OUT_W(DATA_W)) u_hbf2 (
    .clk, .rst(srst), .in_valid(hb1_v), .in_data(hb1_d),
    .out_valid(hb2_v), .out_data(hb2_d)
  );

  fir_dec #(.ORDER(36), .IN_W(DATA_W), .OUT_W(DEC_OUT_W)) u_fir (
    .clk, .rst(srst), .in_valid(hb2_v), .in_data(hb2_d),
    .out_valid, .out_data
  );

  // Only the three defined ratios are legal; 2'd3 would leave HBF I idle.
  a_osr_legal: assert property (@(posedge clk) disable iff (rst)
                                osr_sel inside {OSR128, OSR64, OSR32});
  // At least 32 inputs separate two outputs in every mode.
  a_out_spacing: assert property (@(posedge clk) disable iff (rst)
                                  out_valid |=> !out_valid);

endmodule
