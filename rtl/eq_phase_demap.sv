// eq_phase_demap: HiperLAN/2 equalizer, phase offset correction and
// hard-decision de-mapper (the third receiver tile of the document).
//
// Input: the 64 FFT bins of one OFDM symbol, streamed in bin order. Of the 64
// bins, 52 are used sub-carriers k = -26..-1, 1..26 (bin = k mod 64); four of
// them (k = -21, -7, 7, 21) carry pilots and 48 carry data. The 52-carrier,
// 48-data, 4-pilot split is from the document; the carrier positions are the
// usual HiperLAN/2 / IEEE 802.11a allocation, not given in the document.
//
// Per symbol:
//  1. EQ, 52 cycles: y_k = x_k * e_k, with e_k the equalizer coefficient
//     (Q3.13) the host writes once per MAC frame. The pilot products
//     y_p * ref_p (ref_p = +-1 from pilot_neg) are summed into P.
//  2. PHASE, 10 cycles: a CORDIC in vectoring mode finds theta = arg(P)
//     (one quadrant fold, nine iterations).
//  3. DEMAP, 48 cycles: z_k = y_k * exp(-j*theta) (factor from the sine
//     table), and each axis of z_k is de-mapped by a lookup table: index =
//     clamp(value >> 8, -32, 31) + 32, entry = the axis bits. With 1, 2 or 3
//     bits per axis the same unit de-maps QPSK, 16-QAM and 64-QAM by changing
//     only the table, as the document describes.
// 52 + 10 + 48 = 110 cycles per symbol, the figure the document gives.
// Equalizer and phase corrector share one complex multiply scheme (cmul).
//
// Output: one data carrier per cycle in DEMAP: out_valid, the carrier number,
// I and Q axis bits, and the corrected value for observation.
// The coefficient format, table index scaling and CORDIC are this design's
// choices.
module eq_phase_demap
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host configuration
  input  logic              coef_we,
  input  logic [5:0]        coef_bin,
  input  cplx16_t           coef_val,
  input  logic              lut_we,
  input  logic [5:0]        lut_addr,
  input  logic [2:0]        lut_val,
  input  logic [3:0]        pilot_neg,   // per pilot k=-21,-7,7,21: 1 = -1,
                                         // taken with the symbol's first bin
  // symbol input
  input  logic              in_valid,
  output logic              in_ready,
  input  cplx16_t           in_s,
  // output
  output logic              out_valid,
  output logic signed [5:0] out_k,
  output logic [2:0]        out_ibits,
  output logic [2:0]        out_qbits,
  output cplx16_t           out_z,
  output logic [15:0]       theta,       // 1/65536 turns
  output logic              sym_done
);

  typedef enum logic [1:0] {E_LOAD, E_EQ, E_PHASE, E_DEMAP} state_e;
  state_e state;

  cplx16_t     xs [64];
  cplx16_t     ys [64];
  cplx16_t     ecoef [64];
  logic [2:0]  lut [64];
  logic [5:0]  cnt;
  logic [3:0]  pneg_q;
  logic signed [17:0] p_re, p_im;
  logic signed [19:0] cx, cy;
  logic [15:0] th;

  // used carrier s = 0..51 -> k
  function automatic logic signed [5:0] used_k(logic [5:0] s);
    return (s < 6'd26) ? 6'(s) - 6'sd26 : 6'(s) - 6'sd25;
  endfunction
  // data carrier d = 0..47 -> k (skip DC and the pilots)
  function automatic logic signed [6:0] data_k(logic [5:0] d);
    logic signed [6:0] k;
    k = 7'(d) - 7'sd26;
    if (k >= -7'sd21) k = k + 7'sd1;
    if (k >= -7'sd7)  k = k + 7'sd1;
    if (k >=  7'sd0)  k = k + 7'sd1;
    if (k >=  7'sd7)  k = k + 7'sd1;
    if (k >=  7'sd21) k = k + 7'sd1;
    return k;
  endfunction

  function automatic logic [15:0] atan_tab(logic [3:0] i);
    unique case (i)
      4'd0: return 16'd8192;  4'd1: return 16'd4836; 4'd2: return 16'd2555;
      4'd3: return 16'd1297;  4'd4: return 16'd651;  4'd5: return 16'd326;
      4'd6: return 16'd163;   4'd7: return 16'd81;   default: return 16'd41;
    endcase
  endfunction

  function automatic logic [5:0] axis_idx(logic signed [15:0] v);
    logic signed [7:0] q;
    q = 8'(v >>> 8);
    if (q > 8'sd31)  q = 8'sd31;
    if (q < -8'sd32) q = -8'sd32;
    return 6'(q + 8'sd32);
  endfunction

  // EQ step
  logic signed [5:0] ek;
  logic [5:0]        ebin;
  cplx16_t           yk;
  logic              is_pilot, pneg;
  always_comb begin
    ek   = used_k(cnt);
    ebin = 6'(ek);
    yk   = cmul(xs[ebin], ecoef[ebin], 13);
    is_pilot = (ek == -6'sd21) || (ek == -6'sd7) || (ek == 6'sd7) || (ek == 6'sd21);
    unique case (ek)
      -6'sd21: pneg = pneg_q[0];
      -6'sd7:  pneg = pneg_q[1];
      6'sd7:   pneg = pneg_q[2];
      default: pneg = pneg_q[3];
    endcase
  end

  // DEMAP step
  logic signed [6:0] dk;
  logic [5:0]        dbin;
  logic signed [15:0] s, c;
  cplx16_t           corr, zk;
  logic [15:0]       th_r;
  assign th_r = th + 16'd32;
  sine_rom u_rom (.phase(th_r[15:6]), .sin_o(s), .cos_o(c));
  always_comb begin
    dk      = data_k(cnt);
    dbin    = 6'(dk);
    corr.re = c;
    corr.im = -s;
    zk      = cmul(ys[dbin], corr, 15);
  end

  assign in_ready = (state == E_LOAD);
  assign theta    = th;

  always_ff @(posedge clk) begin
    if (coef_we) ecoef[coef_bin] <= coef_val;
    if (lut_we)  lut[lut_addr]   <= lut_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_LOAD; cnt <= '0; p_re <= '0; p_im <= '0; cx <= '0; cy <= '0;
      th <= '0; pneg_q <= '0; out_valid <= 1'b0; out_k <= '0; out_ibits <= '0;
      out_qbits <= '0; out_z <= '0; sym_done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sym_done  <= 1'b0;
      unique case (state)
        E_LOAD: if (in_valid) begin
          xs[cnt] <= in_s;
          if (cnt == '0) pneg_q <= pilot_neg;
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            state <= E_EQ; cnt <= '0; p_re <= '0; p_im <= '0;
          end
        end
        E_EQ: begin
          ys[ebin] <= yk;
          if (is_pilot) begin
            p_re <= pneg ? p_re - 18'(yk.re) : p_re + 18'(yk.re);
            p_im <= pneg ? p_im - 18'(yk.im) : p_im + 18'(yk.im);
          end
          if (cnt == 6'd51) begin state <= E_PHASE; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        E_PHASE: begin
          if (cnt == '0) begin
            // fold into the right half plane
            if (p_re < 0) begin
              cx <= -20'(p_re); cy <= -20'(p_im); th <= 16'd32768;
            end else begin
              cx <= 20'(p_re);  cy <= 20'(p_im);  th <= 16'd0;
            end
          end else begin
            if (cy > 0) begin
              cx <= cx + (cy >>> (cnt - 1'b1));
              cy <= cy - (cx >>> (cnt - 1'b1));
              th <= th + atan_tab(4'(cnt - 1'b1));
            end else begin
              cx <= cx - (cy >>> (cnt - 1'b1));
              cy <= cy + (cx >>> (cnt - 1'b1));
              th <= th - atan_tab(4'(cnt - 1'b1));
            end
          end
          if (cnt == 6'd9) begin state <= E_DEMAP; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        default: begin  // E_DEMAP
          out_valid <= 1'b1;
          out_k     <= 6'(dk);
          out_z     <= zk;
          out_ibits <= lut[axis_idx(zk.re)];
          out_qbits <= lut[axis_idx(zk.im)];
          if (cnt == 6'd47) begin
            state <= E_LOAD; cnt <= '0; sym_done <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

endmodule
