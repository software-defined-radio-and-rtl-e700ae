// sdr_top: multi-mode software-defined-radio baseband built from
// heterogeneous processing elements.
//
// Three parts sit side by side, each with its own ports:
//  * A Montium coarse-grained reconfigurable tile (montium_tile), with its
//    configuration port and streaming lanes brought out; in the full system
//    these would attach to the network-on-chip, which is not part of this RTL.
//  * The W-CDMA receive chain: pulse-shaping FIR -> per-finger path-delay
//    buffer -> 4-finger RAKE receiver (de-scrambling, de-spreading, maximal
//    ratio combining, QPSK de-mapping), with the scrambling code produced by
//    the shift-register/XOR generator. Path delays, MRC weights and the
//    spreading code come from the host (path searcher and channel estimator
//    run in software).
//  * The HiperLAN/2 receive chain: frequency offset correction -> 64-point
//    FFT -> equalizer / phase offset correction / de-mapper. The frequency
//    offset step and equalizer coefficients come from the host once per MAC
//    frame. Prefix removal is not part of the chain: samples enter already
//    aligned to OFDM symbols, 64 per symbol.
//
// W-CDMA chip flow: one chip enters the chain each time the RAKE takes one
// (every nf cycles). HiperLAN/2 flow: up to 64 samples of a symbol are taken
// while the FFT is loading; then the input waits (hl_in_ready low) until the
// FFT has finished and emptied. The pilot polarities (hl_pilot_neg) are
// taken with the first sample of each symbol and travel with it. hl_overrun counts FFT outputs that found the
// equalizer busy (they are dropped); with the schedules used here it stays 0.
module sdr_top
  import sdr_pkg::*;
  import montium_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // ---------------- Montium tile
  input  logic               mt_cfg_we,
  input  logic [15:0]        mt_cfg_addr,
  input  logic [15:0]        mt_cfg_wdata,
  input  word_t [NBUS-1:0]   mt_in_data,
  input  logic [NBUS-1:0]    mt_in_valid,
  output logic [NBUS-1:0]    mt_in_ready,
  output word_t              mt_out_data,
  output logic               mt_out_valid,
  input  logic               mt_out_ready,
  output logic               mt_running,
  output logic               mt_done,
  output logic               mt_stall,
  // ---------------- W-CDMA receiver
  input  logic               wc_psf_we,
  input  logic [3:0]         wc_psf_addr,
  input  logic signed [15:0] wc_psf_val,
  input  logic               wc_delay_we,
  input  logic [1:0]         wc_delay_f,
  input  logic [8:0]         wc_delay_val,
  input  logic               wc_code_we,
  input  logic [8:0]         wc_code_addr,
  input  logic               wc_code_bit,
  input  logic               wc_const_we,
  input  logic [9:0]         wc_sf,
  input  logic [2:0]         wc_nf,
  input  logic               wc_sc_start,
  input  logic [12:0]        wc_sc_code,
  input  logic               wc_in_valid,
  output logic               wc_in_ready,
  input  cplx16_t            wc_in_s,
  input  logic               wc_coef_valid,
  output logic               wc_coef_ready,
  input  cplx16_t [3:0]      wc_coef,
  output logic               wc_sym_valid,
  output logic [1:0]         wc_sym_bits,
  output logic signed [31:0] wc_sym_re,
  output logic signed [31:0] wc_sym_im,
  output logic               wc_stall,
  // ---------------- HiperLAN/2 receiver
  input  logic               hl_inc_we,
  input  logic [15:0]        hl_inc_val,
  input  logic               hl_coef_we,
  input  logic [5:0]         hl_coef_bin,
  input  cplx16_t            hl_coef_val,
  input  logic               hl_lut_we,
  input  logic [5:0]         hl_lut_addr,
  input  logic [2:0]         hl_lut_val,
  input  logic [3:0]         hl_pilot_neg,
  input  logic               hl_sof,
  input  logic               hl_in_valid,
  output logic               hl_in_ready,
  input  cplx16_t            hl_in_s,
  output logic               hl_out_valid,
  output logic signed [5:0]  hl_out_k,
  output logic [2:0]         hl_out_ibits,
  output logic [2:0]         hl_out_qbits,
  output cplx16_t            hl_out_z,
  output logic [15:0]        hl_theta,
  output logic               hl_sym_done,
  output logic [7:0]         hl_overrun
);

  // ------------------------------------------------------------ Montium tile
  montium_tile u_tile (
    .clk, .rst_n, .cfg_we(mt_cfg_we), .cfg_addr(mt_cfg_addr),
    .cfg_wdata(mt_cfg_wdata), .in_data(mt_in_data), .in_valid(mt_in_valid),
    .in_ready(mt_in_ready), .out_data(mt_out_data), .out_valid(mt_out_valid),
    .out_ready(mt_out_ready), .running(mt_running), .done(mt_done),
    .stall(mt_stall)
  );

  // --------------------------------------------------------- W-CDMA chain
  logic            psf_valid, psf_ready, fb_valid, chip_ready, sc_valid;
  logic            sc_busy, sc_i, sc_q, rake_busy;
  cplx16_t         psf_s;
  cplx16_t [3:0]   taps;

  pulse_shape_filter #(.NTAPS(16)) u_psf (
    .clk, .rst_n, .coef_we(wc_psf_we), .coef_addr(wc_psf_addr),
    .coef_val(wc_psf_val), .in_valid(wc_in_valid), .in_ready(wc_in_ready),
    .in_s(wc_in_s), .out_valid(psf_valid), .out_ready(psf_ready), .out_s(psf_s)
  );

  finger_buffer #(.NF(4), .DEPTH(512)) u_fbuf (
    .clk, .rst_n, .delay_we(wc_delay_we), .delay_f(wc_delay_f),
    .delay_val(wc_delay_val), .in_valid(psf_valid), .in_ready(psf_ready),
    .in_s(psf_s), .out_valid(fb_valid), .out_ready(chip_ready), .taps
  );

  scrambling_code_gen u_scg (
    .clk, .rst_n, .start(wc_sc_start), .code_n(wc_sc_code),
    .ready(chip_ready), .valid(sc_valid), .busy(sc_busy), .c_i(sc_i), .c_q(sc_q)
  );

  rake_receiver #(.NF(4), .SF_MAX(512)) u_rake (
    .clk, .rst_n, .code_we(wc_code_we), .code_addr(wc_code_addr),
    .code_bit(wc_code_bit), .const_we(wc_const_we), .sf_val(wc_sf),
    .nf_val(wc_nf), .chip_valid(fb_valid && sc_valid), .chip_ready,
    .chip(taps), .sc_i, .sc_q, .coef_valid(wc_coef_valid),
    .coef_ready(wc_coef_ready), .coef(wc_coef), .sym_valid(wc_sym_valid),
    .sym_bits(wc_sym_bits), .sym_re(wc_sym_re), .sym_im(wc_sym_im),
    .stall(wc_stall), .busy(rake_busy)
  );

  // ------------------------------------------------------ HiperLAN/2 chain
  logic       foc_valid, fft_in_ready, fft_valid, fft_busy, eq_ready;
  logic       hl_wait;
  logic [3:0] pneg_q;
  logic [6:0] hl_cnt;
  logic [5:0] fft_idx;
  cplx16_t    foc_s, fft_s;

  assign hl_in_ready = fft_in_ready && !hl_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hl_wait <= 1'b0; hl_cnt <= '0; hl_overrun <= '0; pneg_q <= '0;
    end else begin
      if (hl_in_valid && hl_in_ready) begin
        if (hl_cnt == '0) pneg_q <= hl_pilot_neg;
        if (hl_cnt == 7'd63) begin hl_cnt <= '0; hl_wait <= 1'b1; end
        else hl_cnt <= hl_cnt + 1'b1;
      end
      if (hl_wait && fft_busy) hl_wait <= 1'b0;
      if (fft_valid && !eq_ready && hl_overrun != 8'hff)
        hl_overrun <= hl_overrun + 1'b1;
    end
  end

  freq_offset_corr u_foc (
    .clk, .rst_n, .inc_we(hl_inc_we), .inc_val(hl_inc_val), .sof(hl_sof),
    .in_valid(hl_in_valid && hl_in_ready), .in_s(hl_in_s),
    .out_valid(foc_valid), .out_s(foc_s)
  );

  fft64 u_fft (
    .clk, .rst_n, .in_valid(foc_valid), .in_ready(fft_in_ready), .in_s(foc_s),
    .out_valid(fft_valid), .out_idx(fft_idx), .out_s(fft_s),
    .computing(fft_busy)
  );

  eq_phase_demap u_eq (
    .clk, .rst_n, .coef_we(hl_coef_we), .coef_bin(hl_coef_bin),
    .coef_val(hl_coef_val), .lut_we(hl_lut_we), .lut_addr(hl_lut_addr),
    .lut_val(hl_lut_val), .pilot_neg(pneg_q),
    .in_valid(fft_valid), .in_ready(eq_ready), .in_s(fft_s),
    .out_valid(hl_out_valid), .out_k(hl_out_k), .out_ibits(hl_out_ibits),
    .out_qbits(hl_out_qbits), .out_z(hl_out_z), .theta(hl_theta),
    .sym_done(hl_sym_done)
  );

endmodule
