// fft64: 64-point FFT that performs the inverse-OFDM step of the HiperLAN/2
// receiver (received time samples -> sub-carrier values).
//
// Radix-2 decimation in time, in place, one butterfly per clock cycle. The 64
// input samples are written at bit-reversed addresses as they arrive (one per
// cycle, in_valid). Six stages of 32 butterflies follow. A butterfly reads its
// two operands and the twiddle W64^k = exp(-j*2*pi*k/64) (from the sine
// table), registers them, multiplies in the next cycle and writes
// (a +- b*W)/2 in the third; each stage therefore takes 32 + 2 = 34 cycles so
// that the next stage reads only written data, and the whole transform takes
// 6 * 34 = 204 cycles, the figure the document gives for its 64-FFT. Each
// stage halves its results, so the output is DFT(x)/64. The 64 results then
// stream out in natural bin order (out_valid, out_idx), after which the unit
// accepts the next symbol (in_ready).
// The algorithm and scaling are this design's choices; the document gives the
// size and cycle count only.
module fft64
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx16_t     in_s,
  output logic        out_valid,
  output logic [5:0]  out_idx,
  output cplx16_t     out_s,
  output logic        computing
);

  typedef enum logic [1:0] {F_LOAD, F_CALC, F_OUT} state_e;
  state_e state;

  cplx16_t     mem [64];
  logic [5:0]  cnt;
  logic [2:0]  stg;
  logic [5:0]  k;          // cycle within a stage, 0..33
  logic [5:0]  i0, i1, tw;
  logic        v1, v2;
  logic [5:0]  a1, b1, a2, b2;
  cplx16_t     ra, rb, rw, pa, pt;
  logic signed [15:0] s, c;

  function automatic logic [5:0] bitrev6(logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

  // butterfly j = k (0..31) of stage stg
  always_comb begin
    logic [4:0] j, pos, grp;
    logic [5:0] h;
    j   = k[4:0];
    h   = 6'd1 << stg;
    pos = j & 5'(h - 6'd1);
    grp = j >> stg;
    i0  = 6'(({1'b0, grp} << (stg + 3'd1)) + {1'b0, pos});
    i1  = i0 + h;
    tw  = 6'(pos << (3'd5 - stg));        // k of W64^k
  end

  sine_rom u_rom (.phase({tw, 4'd0}), .sin_o(s), .cos_o(c));

  assign in_ready  = (state == F_LOAD);
  assign computing = (state == F_CALC);

  // second pipeline stage: t = b * W, W = cos - j sin
  cplx16_t tprod;
  cplx16_t wv;
  always_comb begin
    tprod = cmul(rb, rw, 15);
    wv.re = c;
    wv.im = -s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_LOAD; cnt <= '0; stg <= '0; k <= '0; v1 <= 1'b0; v2 <= 1'b0;
      out_valid <= 1'b0; out_idx <= '0; out_s <= '0;
      a1 <= '0; b1 <= '0; a2 <= '0; b2 <= '0;
      ra <= '0; rb <= '0; rw <= '0; pa <= '0; pt <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        F_LOAD: if (in_valid) begin
          mem[bitrev6(cnt)] <= in_s;
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            state <= F_CALC; stg <= '0; k <= '0;
          end
        end
        F_CALC: begin
          // stage 1: read
          v1 <= (k < 6'd32);
          a1 <= i0; b1 <= i1;
          ra <= mem[i0]; rb <= mem[i1]; rw <= wv;
          // stage 2: multiply
          v2 <= v1; a2 <= a1; b2 <= b1; pa <= ra; pt <= tprod;
          // stage 3: add and write back, halved
          if (v2) begin
            mem[a2].re <= 16'((17'(pa.re) + 17'(pt.re)) >>> 1);
            mem[a2].im <= 16'((17'(pa.im) + 17'(pt.im)) >>> 1);
            mem[b2].re <= 16'((17'(pa.re) - 17'(pt.re)) >>> 1);
            mem[b2].im <= 16'((17'(pa.im) - 17'(pt.im)) >>> 1);
          end
          if (k == 6'd33) begin
            k <= '0;
            if (stg == 3'd5) begin
              state <= F_OUT; cnt <= '0;
            end else begin
              stg <= stg + 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        default: begin  // F_OUT
          out_valid <= 1'b1;
          out_idx   <= cnt;
          out_s     <= mem[cnt];
          cnt       <= cnt + 1'b1;
          if (cnt == 6'd63) state <= F_LOAD;
        end
      endcase
    end
  end

endmodule
