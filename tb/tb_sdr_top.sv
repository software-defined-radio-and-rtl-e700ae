// tb_sdr_top: end-to-end run of the whole platform at its default sizes.
//  * Montium tile: configured through its port, runs a streamed
//    multiply-accumulate program; result, CCU stalls checked.
//  * W-CDMA: QPSK symbols spread (SF 32) with a user code, scrambled with
//    the generator's own complex code (reference LFSRs here), sent over four
//    paths with different delays and gains, pulse-shaping filter set to a
//    single tap, finger delays set to align the paths, MRC weights = path
//    gains. Soft values are checked exactly against an integer model of the
//    received stream, bits against the transmitted ones, the symbol period
//    against 4*SF+5, then the receiver is switched to 2 fingers (2*SF+3).
//    Chip-stream gaps make the receiver stall.
//  * HiperLAN/2: 16-QAM OFDM symbols built here with an inverse DFT, rotated
//    by a frequency offset and a common phase, corrected, transformed,
//    equalised (coefficient 3.0 on every carrier), phase-corrected and
//    de-mapped; all 48 x 3 symbols' bits checked, 64-QAM table switch on the
//    last symbol.
// Counts how often each mechanism happened and fails if one never did.
module tb_sdr_top;
  import sdr_pkg::*;
  import montium_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  // Montium
  logic mt_cfg_we = 0; logic [15:0] mt_cfg_addr = 0, mt_cfg_wdata = 0;
  word_t [NBUS-1:0] mt_in_data; logic [NBUS-1:0] mt_in_valid, mt_in_ready;
  word_t mt_out_data; logic mt_out_valid, mt_out_ready, mt_running, mt_done, mt_stall;
  // W-CDMA
  logic wc_psf_we = 0; logic [3:0] wc_psf_addr = 0; logic signed [15:0] wc_psf_val = 0;
  logic wc_delay_we = 0; logic [1:0] wc_delay_f = 0; logic [8:0] wc_delay_val = 0;
  logic wc_code_we = 0; logic [8:0] wc_code_addr = 0; logic wc_code_bit = 0;
  logic wc_const_we = 0; logic [9:0] wc_sf = 0; logic [2:0] wc_nf = 0;
  logic wc_sc_start = 0; logic [12:0] wc_sc_code = 0;
  logic wc_in_valid = 0, wc_in_ready; cplx16_t wc_in_s;
  logic wc_coef_valid = 0, wc_coef_ready; cplx16_t [3:0] wc_coef;
  logic wc_sym_valid; logic [1:0] wc_sym_bits; logic signed [31:0] wc_sym_re, wc_sym_im;
  logic wc_stall;
  // HiperLAN/2
  logic hl_inc_we = 0; logic [15:0] hl_inc_val = 0;
  logic hl_coef_we = 0; logic [5:0] hl_coef_bin = 0; cplx16_t hl_coef_val;
  logic hl_lut_we = 0; logic [5:0] hl_lut_addr = 0; logic [2:0] hl_lut_val = 0;
  logic [3:0] hl_pilot_neg = 0; logic hl_sof = 0, hl_in_valid = 0, hl_in_ready;
  cplx16_t hl_in_s; logic hl_out_valid; logic signed [5:0] hl_out_k;
  logic [2:0] hl_out_ibits, hl_out_qbits; cplx16_t hl_out_z; logic [15:0] hl_theta;
  logic hl_sym_done; logic [7:0] hl_overrun;

  int checks = 0, failures = 0;
  int n_mt_stall = 0, n_wc_stall = 0, n_wc_sym4 = 0, n_wc_sym2 = 0, n_hl_sym = 0;
  int n_hl_qam64 = 0, n_mt_done = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  always #5 clk = ~clk;
  sdr_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("watchdog: wcdma symbols %0d, ofdm symbols %0d, montium done %0d", wsym, n_hl_sym, n_mt_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (mt_stall) n_mt_stall++;
    if (wc_stall) n_wc_stall++;
  end

  // ================================================================ Montium
  task automatic mcfg(logic [15:0] a, logic [15:0] d);
    @(negedge clk); mt_cfg_we = 1; mt_cfg_addr = a; mt_cfg_wdata = d;
    @(negedge clk); mt_cfg_we = 0;
  endtask
  task automatic mput(logic [2:0] region, int entry, logic [255:0] bits, int nbits);
    for (int w = 0; w < (nbits + 15) / 16; w++)
      mcfg(make_cfg_addr(region, entry, w), bits[16*w +: 16]);
  endtask

  task automatic run_montium();
    localparam int N = 12;
    word_t mv [N+1], sv [N+1];
    longint expsum = 0;
    int consumed = 0, outs = 0;
    word_t got;
    xbar_entry_t x0, x1; reg_entry_t r0; mem_entry_t m0; alu_entry_t a0;
    instr_t p [4];
    for (int i = 0; i <= N; i++) begin
      mv[i] = word_t'(int'($urandom % 101) - 50); sv[i] = word_t'(int'($urandom % 101) - 50);
      mcfg(make_cfg_addr(R_MEMDAT, 0, 0) | 16'(i), mv[i]);
      if (i < N) expsum += longint'(mv[i]) * longint'(sv[i]);
    end
    x0 = '0; x0.src[0] = SRC_MEM0; x0.src[1] = SRC_CCU; x0.src[2] = SRC_ALU0;
    x0.src[3] = SRC_ALU0 + 5'd2;
    x1 = '0; x1.src[3] = SRC_ALU0 + 5'd2;
    r0 = '0; r0.rf[0][0].we = 1; r0.rf[0][2].we = 1; r0.rf[0][2].bus = 4'd1;
    r0.rf[1][0].we = 1; r0.rf[1][0].bus = 4'd2;
    m0 = '0; m0.m[0].step = 1;
    a0 = '0; a0.a[0].mul = MUL_INT; a0.a[0].add_src = ADD_EAST;
    mput(R_XBAR, 0, 256'(x0), $bits(x0)); mput(R_XBAR, 1, 256'(x1), $bits(x1));
    mput(R_REGDEC, 0, 256'(r0), $bits(r0)); mput(R_MEMDEC, 0, 256'(m0), $bits(m0));
    mput(R_ALUDEC, 0, 256'(a0), $bits(a0));
    p[0] = '0; p[0].op = SQ_SETLC; p[0].count = 10'(N - 1);
    p[1] = '0; p[1].op = SQ_LOOP; p[1].target = 6'd1;
    p[2] = '0; p[2].xbar_i = 5'd1; p[2].reg_i = 5'd1; p[2].mem_i = 5'd1;
    p[2].out_en = 1; p[2].out_bus = 4'd3;
    p[3] = '0; p[3].op = SQ_HALT; p[3].xbar_i = 5'd1; p[3].reg_i = 5'd1; p[3].mem_i = 5'd1;
    for (int i = 0; i < 4; i++) mput(R_PROG, i, 256'(p[i]), $bits(instr_t));
    mcfg(make_cfg_addr(R_CTRL, 0, 0), 16'd1);
    while (!mt_done) begin
      @(negedge clk);
      mt_in_valid = '0;
      mt_in_valid[1] = (consumed <= N) && ($urandom % 2 != 0);
      mt_in_data[1] = sv[consumed > N ? N : consumed];
      mt_out_ready = $urandom % 2 != 0;
      @(posedge clk);
      if (mt_in_valid[1] && mt_in_ready[1]) consumed++;
      if (mt_out_valid && mt_out_ready) begin outs++; got = mt_out_data; end
    end
    n_mt_done++;
    checks++;
    if (outs != 1 || got !== word_t'(expsum)) begin
      failures++; $display("montium result %0d exp %0d", got, expsum);
    end
  endtask

  // ================================================================ W-CDMA
  localparam int SF = 32, NSYM = 10, TMAX = 6, NCH = SF * NSYM * 2 + 64;
  localparam int PER = 262143;
  bit gx [PER + 1200], gy [PER + 1200];
  int tau [4] = '{0, 2, 3, 6};
  longint gre [4] = '{3000, -1500, 1200, -800};
  longint gim [4] = '{1000, 2000, -1400, 600};
  bit ucode [SF];
  int tb0 [NCH/SF], tb1 [NCH/SF];
  longint tre [NCH + 8], tim [NCH + 8];    // T[n]
  longint rre [NCH], rim [NCH];            // received r[k]
  int wsym = 0, nf_now = 4, wc_last = -1, wc_cyc = 0, wc_exp_syms = 0;

  function automatic bit sc_i_ref(int n); return gx[n] ^ gy[n]; endfunction
  function automatic bit sc_q_ref(int n);
    return gx[(n + 131072) % PER] ^ gy[(n + 131072) % PER];
  endfunction

  always @(posedge clk) wc_cyc++;

  // expected soft value of rake symbol j (fingers 0..nf-1, input index n)
  function automatic void wc_expect(int j, int nf, output longint er, output longint ei);
    longint sr = 0, si = 0;
    for (int f = 0; f < nf; f++) begin
      longint ar = 0, ai = 0;
      for (int c = 0; c < SF; c++) begin
        int n = j * SF + c;
        int k = n - (TMAX - tau[f]);
        longint dr, di, cr, ci, m;
        if (k < 0) continue;
        dr = rre[k]; di = rim[k];
        cr = sc_i_ref(n) ? -1 : 1; ci = sc_q_ref(n) ? -1 : 1; m = ucode[c] ? -1 : 1;
        ar += m * (dr * cr + di * ci);
        ai += m * (di * cr - dr * ci);
      end
      sr += ar * gre[f] * 8 + ai * gim[f] * 8;
      si += ai * gre[f] * 8 - ar * gim[f] * 8;
    end
    er = sr >>> 15; ei = si >>> 15;
  endfunction

  always @(posedge clk) if (rst_n && wc_sym_valid) begin
    longint er, ei;
    wc_expect(wsym, nf_now, er, ei);
    if (wsym > 0) begin   // symbol 0 holds chips from before the buffer filled
      checks++;
      if (longint'(wc_sym_re) != er || longint'(wc_sym_im) != ei) begin
        failures++; $display("wcdma sym %0d soft %0d,%0d exp %0d,%0d", wsym, wc_sym_re, wc_sym_im, er, ei);
      end
      checks++;
      if (wc_sym_bits !== {1'(tb1[wsym]), 1'(tb0[wsym])}) begin
        failures++; $display("wcdma sym %0d bits %b exp %b%b", wsym, wc_sym_bits, tb1[wsym], tb0[wsym]);
      end
      if (wc_last >= 0 && wsym > 2 && wsym != NSYM) begin
        checks++;
        if (wc_cyc - wc_last != nf_now * SF + nf_now + 1) begin
          failures++; $display("wcdma period %0d", wc_cyc - wc_last);
        end else if (nf_now == 4) n_wc_sym4++;
        else n_wc_sym2++;
      end
    end
    wc_last = wc_cyc;
    wsym++;
  end

  task automatic run_wcdma();
    // reference Gold code
    for (int k = 0; k < 18; k++) begin gx[k] = (k == 0); gy[k] = 1; end
    for (int k = 0; k + 18 < PER + 1200; k++) begin
      gx[k+18] = gx[k+7] ^ gx[k];
      gy[k+18] = gy[k+10] ^ gy[k+7] ^ gy[k+5] ^ gy[k];
    end
    for (int c = 0; c < SF; c++) ucode[c] = 1'($urandom);
    for (int j = 0; j < NCH / SF; j++) begin tb0[j] = $urandom % 2; tb1[j] = $urandom % 2; end
    // T[n] = sym * code * scrambling chip n (gain 1); scaled so the stream
    // stays well inside 16 bits
    for (int n = 0; n < NCH + 8; n++) begin
      longint sr, si, cr, ci, m;
      sr = tb0[n / SF] ? -1 : 1; si = tb1[n / SF] ? -1 : 1;
      cr = sc_i_ref(n) ? -1 : 1; ci = sc_q_ref(n) ? -1 : 1; m = ucode[n % SF] ? -1 : 1;
      tre[n] = m * (sr * cr - si * ci); tim[n] = m * (sr * ci + si * cr);
    end
    for (int k = 0; k < NCH; k++) begin
      rre[k] = int'($urandom % 41) - 20; rim[k] = int'($urandom % 41) - 20;
      for (int f = 0; f < 4; f++) begin
        int t = k + TMAX - tau[f];
        rre[k] += gre[f] * tre[t] - gim[f] * tim[t];
        rim[k] += gre[f] * tim[t] + gim[f] * tre[t];
      end
    end
    // configuration: filter = one tap of 0.5 (the stream is sent doubled)
    for (int t = 0; t < 16; t++) begin
      @(negedge clk); wc_psf_we = 1; wc_psf_addr = 4'(t); wc_psf_val = (t == 0) ? 16'sd16384 : 16'sd0;
    end
    @(negedge clk); wc_psf_we = 0;
    for (int f = 0; f < 4; f++) begin
      @(negedge clk); wc_delay_we = 1; wc_delay_f = 2'(f); wc_delay_val = 9'(TMAX - tau[f]);
    end
    @(negedge clk); wc_delay_we = 0;
    for (int c = 0; c < SF; c++) begin
      @(negedge clk); wc_code_we = 1; wc_code_addr = 9'(c); wc_code_bit = ucode[c];
    end
    @(negedge clk); wc_code_we = 0; wc_const_we = 1; wc_sf = 10'(SF); wc_nf = 3'd4;
    @(negedge clk); wc_const_we = 0; wc_sc_start = 1; wc_sc_code = 0;
    @(negedge clk); wc_sc_start = 0;
    for (int f = 0; f < 4; f++) begin
      wc_coef[f].re = 16'(gre[f] * 8); wc_coef[f].im = 16'(gim[f] * 8);
    end
    wc_coef_valid = 1;
    // stream: the pulse filter output register adds one sample of slack
    begin
      int k = 0;
      while (wsym < 2 * NSYM) begin
        if (k == NSYM * SF && nf_now == 4) begin
          // switch to two fingers between symbols: only the constant changes
          wc_in_valid = 0;
          wait (wsym == NSYM);
          @(negedge clk);
          @(negedge clk); wc_const_we = 1; wc_sf = 10'(SF); wc_nf = 3'd2;
          @(negedge clk); wc_const_we = 0;
          nf_now = 2; wc_last = -1;
        end
        // a few gaps in the middle of the first symbols make the RAKE wait
        wc_in_valid = (k < NCH) && !(wsym == 1 && ($urandom % 4 == 0));
        wc_in_s.re = 16'(2 * rre[k < NCH ? k : 0]); wc_in_s.im = 16'(2 * rim[k < NCH ? k : 0]);
        @(posedge clk);
        if (wc_in_valid && wc_in_ready) k++;
        @(negedge clk);
      end
      wc_in_valid = 0;
    end
  endtask

  // ============================================================== HiperLAN/2
  int hl_lev_i [4][64], hl_lev_q [4][64], hl_nb [4], hl_nout = 0, hl_err = 0;
  int hl_sym_in = 0;
  function automatic int gray(int l, int bits);
    int g3 [8] = '{0, 1, 3, 2, 6, 7, 5, 4};
    int g2 [4] = '{0, 1, 3, 2};
    if (bits == 1) return l;
    if (bits == 2) return g2[l];
    return g3[l];
  endfunction

  always @(posedge clk) if (rst_n && hl_out_valid) begin
    int b, s;
    b = int'(6'(hl_out_k));
    s = hl_nout / 48;
    checks++;
    if (int'(hl_out_ibits) != gray(hl_lev_i[s][b], hl_nb[s]) ||
        int'(hl_out_qbits) != gray(hl_lev_q[s][b], hl_nb[s])) begin
      failures++; hl_err++;
      if (hl_err < 6) $display("hl sym %0d k=%0d bits %0d,%0d exp %0d,%0d", s, hl_out_k, hl_out_ibits,
                               hl_out_qbits, gray(hl_lev_i[s][b], hl_nb[s]), gray(hl_lev_q[s][b], hl_nb[s]));
    end
    hl_nout++;
  end
  always @(posedge clk) if (rst_n && hl_sym_done) begin
    if (hl_nb[n_hl_sym] == 3) n_hl_qam64++;
    n_hl_sym++;
  end

  task automatic hl_symbol(int bits, real phi, int inc, bit first);
    real yr [64], yi [64];
    int s = hl_sym_in;
    hl_nb[s] = bits;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); hl_lut_we = 1; hl_lut_addr = 6'(a);
      hl_lut_val = 3'(gray(a / (64 >> bits), bits));
    end
    @(negedge clk); hl_lut_we = 0;
    hl_pilot_neg = 4'($urandom);
    // carrier values after the FFT (= DFT/64) are one third of the
    // constellation; the equalizer multiplies by 3
    for (int b = 0; b < 64; b++) begin
      int k = (b < 32) ? b : b - 64;
      int m = 1 << bits;
      real u = 8192.0 / real'(m);
      yr[b] = 0; yi[b] = 0;
      if (k == 0 || k > 26 || k < -26) continue;
      if (k == -21 || k == -7 || k == 7 || k == 21) begin
        int p = (k == -21) ? 0 : (k == -7) ? 1 : (k == 7) ? 2 : 3;
        yr[b] = (hl_pilot_neg[p] ? -4000.0 : 4000.0) / 3.0;
      end else begin
        hl_lev_i[s][b] = $urandom % m; hl_lev_q[s][b] = $urandom % m;
        yr[b] = (2.0 * hl_lev_i[s][b] - (m - 1)) * u / 3.0;
        yi[b] = (2.0 * hl_lev_q[s][b] - (m - 1)) * u / 3.0;
      end
    end
    while (!hl_in_ready) @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      real xr = 0, xi = 0, th, cr, ci;
      for (int b = 0; b < 64; b++) begin
        xr += yr[b] * $cos(2.0 * PI * b * n / 64.0) - yi[b] * $sin(2.0 * PI * b * n / 64.0);
        xi += yr[b] * $sin(2.0 * PI * b * n / 64.0) + yi[b] * $cos(2.0 * PI * b * n / 64.0);
      end
      // common phase and frequency offset (counted from the frame start)
      th = phi + 2.0 * PI * real'((hl_frame_n * inc) % 65536) / 65536.0;
      cr = xr * $cos(th) - xi * $sin(th);
      ci = xr * $sin(th) + xi * $cos(th);
      if (cr > 32767.0) cr = 32767.0; if (cr < -32768.0) cr = -32768.0;
      if (ci > 32767.0) ci = 32767.0; if (ci < -32768.0) ci = -32768.0;
      hl_in_s.re = 16'($rtoi(cr)); hl_in_s.im = 16'($rtoi(ci));
      hl_in_valid = 1; hl_sof = first && (n == 0);
      @(posedge clk);
      while (!hl_in_ready) @(posedge clk);
      hl_frame_n++;
      @(negedge clk);
    end
    hl_in_valid = 0; hl_sof = 0;
    hl_sym_in++;
  endtask
  int hl_frame_n = 0;

  task automatic run_hiperlan();
    int inc = 700;
    @(negedge clk); hl_inc_we = 1; hl_inc_val = 16'(inc);
    @(negedge clk); hl_inc_we = 0;
    for (int b = 0; b < 64; b++) begin
      @(negedge clk); hl_coef_we = 1; hl_coef_bin = 6'(b);
      hl_coef_val.re = 16'sd24576; hl_coef_val.im = 16'sd0;   // 3.0 in Q3.13
    end
    @(negedge clk); hl_coef_we = 0;
    hl_frame_n = 0;
    hl_symbol(2, 0.4, inc, 1);
    hl_symbol(2, 0.4, inc, 0);
    wait (n_hl_sym == 2);
    hl_symbol(3, 0.4, inc, 0);
    wait (n_hl_sym == 3);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    mt_in_data = '0; mt_in_valid = '0; mt_out_ready = 0; wc_in_s = '0; wc_coef = '0;
    hl_coef_val = '0; hl_in_s = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      run_montium();
      run_wcdma();
      run_hiperlan();
    join
    checks++;
    if (hl_nout != 144 || hl_overrun != 0) begin failures++; $display("hl outputs %0d overrun %0d", hl_nout, hl_overrun); end
    $display("mechanisms: montium runs %0d, montium CCU stalls %0d, rake stalls %0d,",
             n_mt_done, n_mt_stall, n_wc_stall);
    $display("  4-finger symbols %0d, 2-finger symbols %0d, OFDM symbols %0d (64-QAM %0d)",
             n_wc_sym4, n_wc_sym2, n_hl_sym, n_hl_qam64);
    checks++; if (n_mt_done == 0)  begin failures++; $display("montium program never ran"); end
    checks++; if (n_mt_stall == 0) begin failures++; $display("no CCU stall"); end
    checks++; if (n_wc_stall == 0) begin failures++; $display("no RAKE stall"); end
    checks++; if (n_wc_sym4 == 0)  begin failures++; $display("no 4-finger symbol"); end
    checks++; if (n_wc_sym2 == 0)  begin failures++; $display("no 2-finger symbol"); end
    checks++; if (n_hl_qam64 == 0) begin failures++; $display("no de-mapper table switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
