// freq_offset_corr: HiperLAN/2 frequency offset correction.
//
// Every complex sample is multiplied by the correction factor exp(-j*theta_n)
// with theta_n = n * phase_inc, n counting samples from the last sof (start of
// frame). phase_inc is the per-sample phase step of the estimated frequency
// offset, written by the host once per MAC frame, in 1/65536 turns. The factor
// is read from a sine/cosine lookup table (top 10 bits of the phase), as the
// document describes. The product is rounded to 16 bits.
//
// Pipeline: stage 1 registers the sample with the looked-up factor, stage 2
// the product, stage 3 the output. Each result appears 3 cycles after its
// sample, so a 64-sample OFDM symbol accepted in cycles 0..63 leaves in
// cycles 3..66: 67 cycles per symbol, the figure the document gives.
// Accumulator width, table size and rounding are this design's choices.
module freq_offset_corr
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inc_we,
  input  logic [15:0] inc_val,
  input  logic        sof,        // with in_valid: this sample is n = 0
  input  logic        in_valid,
  input  cplx16_t     in_s,
  output logic        out_valid,
  output cplx16_t     out_s
);

  logic [15:0] phase_inc, phase;
  logic [15:0] ph_now;
  logic signed [15:0] s, c;
  logic        v1, v2;
  cplx16_t     x1, f1, p2;

  assign ph_now = sof ? 16'd0 : phase;

  sine_rom u_rom (.phase(ph_now[15:6]), .sin_o(s), .cos_o(c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_inc <= '0; phase <= '0; v1 <= 1'b0; x1 <= '0; f1 <= '0;
      v2 <= 1'b0; p2 <= '0;
      out_valid <= 1'b0; out_s <= '0;
    end else begin
      if (inc_we) phase_inc <= inc_val;
      v1 <= in_valid;
      if (in_valid) begin
        phase <= ph_now + phase_inc;
        x1    <= in_s;
        f1.re <= c;
        f1.im <= -s;          // exp(-j theta)
      end
      v2 <= v1;
      if (v1) p2 <= cmul(x1, f1, 15);
      out_valid <= v2;
      if (v2) out_s <= p2;
    end
  end

endmodule
