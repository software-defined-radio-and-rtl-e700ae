// pulse_shape_filter: complex FIR pulse-shaping (receive) filter that feeds
// the RAKE receiver.
//
// y[n] = sum_{t=0}^{NTAPS-1} h[t] * x[n-t], applied to the I and Q parts
// alike, with real Q1.15 taps the host writes through coef_we. Each accepted
// input sample shifts the delay line and produces one output sample, held in
// an output register with a valid/ready handshake (in_ready is high when the
// output register is empty or being read). The sum is rounded and saturated
// to 16 bits. The document names this filter as an FIR filter but does not
// give its length or taps; NTAPS = 16 and programmable taps are this design's
// choice (a root-raised-cosine response is the usual content).
module pulse_shape_filter
  import sdr_pkg::*;
#(
  parameter int NTAPS = 16,
  localparam int TW   = $clog2(NTAPS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               coef_we,
  input  logic [TW-1:0]      coef_addr,
  input  logic signed [15:0] coef_val,
  input  logic               in_valid,
  output logic               in_ready,
  input  cplx16_t            in_s,
  output logic               out_valid,
  input  logic               out_ready,
  output cplx16_t            out_s
);

  logic signed [15:0] h [NTAPS];
  cplx16_t            dl [NTAPS];   // dl[0] = newest
  cplx16_t            y;

  function automatic logic signed [15:0] round_sat(logic signed [39:0] v);
    logic signed [39:0] r;
    r = (v + 40'sd16384) >>> 15;
    if (r > 40'sd32767)       return 16'sh7fff;
    else if (r < -40'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

  always_comb begin
    logic signed [39:0] ar, ai;
    ar = 40'(h[0] * in_s.re);
    ai = 40'(h[0] * in_s.im);
    for (int t = 1; t < NTAPS; t++) begin
      ar += 40'(h[t] * dl[t-1].re);
      ai += 40'(h[t] * dl[t-1].im);
    end
    y.re = round_sat(ar);
    y.im = round_sat(ai);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (coef_we) h[coef_addr] <= coef_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAPS; t++) dl[t] <= '0;
      out_valid <= 1'b0; out_s <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        dl[0] <= in_s;
        for (int t = 1; t < NTAPS; t++) dl[t] <= dl[t-1];
        out_s     <= y;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
