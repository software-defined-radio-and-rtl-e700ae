// tb_eq_phase_demap: three OFDM symbols, QPSK, 16-QAM and 64-QAM, each after
// reloading only the de-mapping table. Every used carrier carries a known
// point X_k, passes a random channel H_k and a common phase rotation phi;
// the host coefficients are 1/H_k. Checks: the corrected value of each data
// carrier within 1.5 % of full scale of X_k, the de-mapped bits (Gray
// mapping, IEEE 802.11a style), the estimated phase, the carrier order and
// the 110-cycle processing time per symbol.
module tb_eq_phase_demap;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0, lut_we = 0, in_valid = 0, in_ready, out_valid, sym_done;
  logic [5:0] coef_bin = 0, lut_addr = 0; cplx16_t coef_val, in_s, out_z;
  logic [2:0] lut_val = 0, out_ibits, out_qbits; logic [3:0] pilot_neg = 0;
  logic signed [5:0] out_k; logic [15:0] theta;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  always #5 clk = ~clk;
  eq_phase_demap dut (.*);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nb;                       // bits per axis
  int lev_i [64], lev_q [64];   // transmitted level index per bin
  real xr [64], xi [64];        // transmitted points
  int busy_cyc = 0, nout = 0;
  int dk_exp [48];

  function automatic int gray(int l, int bits);
    int g3 [8] = '{0, 1, 3, 2, 6, 7, 5, 4};
    int g2 [4] = '{0, 1, 3, 2};
    if (bits == 1) return l;
    if (bits == 2) return g2[l];
    return g3[l];
  endfunction

  function automatic real level(int l, int bits);
    int m = 1 << bits;
    real u = 8192.0 / real'(m);     // outer points at (m-1)*u < 8192
    return (2.0 * l - (m - 1)) * u;
  endfunction

  always @(posedge clk) begin
    if (!in_ready) busy_cyc++;
    if (out_valid && rst_n) begin
      int b;
      logic signed [15:0] zr, zi;
      b = int'(6'(out_k));
      zr = out_z.re; zi = out_z.im;
      checks++;
      if (int'(out_k) != dk_exp[nout % 48] ||
          int'(out_ibits) != gray(lev_i[b], nb) || int'(out_qbits) != gray(lev_q[b], nb) ||
          rabs(real'(zr) - xr[b]) > 120.0 || rabs(real'(zi) - xi[b]) > 120.0) begin
        failures++;
        if (failures < 10)
          $display("k=%0d bits %0d,%0d exp %0d,%0d z %0d,%0d exp %f,%f", out_k, out_ibits,
                   out_qbits, gray(lev_i[b], nb), gray(lev_q[b], nb), zr, zi, xr[b], xi[b]);
      end
      nout++;
    end
  end

  task automatic symbol(int bits, real phi);
    real hr [64], hi [64];
    nb = bits;
    // de-mapping table for this modulation
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); lut_we = 1; lut_addr = 6'(a);
      lut_val = 3'(gray(a / (64 >> bits), bits));
    end
    @(negedge clk); lut_we = 0;
    pilot_neg = 4'($urandom);
    for (int k = -26; k <= 26; k++) begin
      int b, p;
      real r, m2, er, ei;
      if (k == 0) continue;
      b = (k + 64) % 64;
      p = (k == -21) ? 0 : (k == -7) ? 1 : (k == 7) ? 2 : (k == 21) ? 3 : -1;
      if (p >= 0) begin
        xr[b] = pilot_neg[p] ? -4000.0 : 4000.0; xi[b] = 0.0;
      end else begin
        lev_i[b] = $urandom % (1 << bits); lev_q[b] = $urandom % (1 << bits);
        xr[b] = level(lev_i[b], bits); xi[b] = level(lev_q[b], bits);
      end
      r = 0.6 + 0.8 * ($urandom % 1000) / 1000.0;
      m2 = 2.0 * PI * ($urandom % 1000) / 1000.0;
      hr[b] = r * $cos(m2); hi[b] = r * $sin(m2);
      // coefficient 1/H in Q3.13
      er = hr[b] / (r * r); ei = -hi[b] / (r * r);
      @(negedge clk); coef_we = 1; coef_bin = 6'(b);
      coef_val.re = 16'($rtoi(er * 8192.0)); coef_val.im = 16'($rtoi(ei * 8192.0));
    end
    @(negedge clk); coef_we = 0;
    // received bins: H * X * exp(j phi); unused bins carry noise only
    for (int b = 0; b < 64; b++) begin
      real yr, yi, cr, ci;
      int k = (b < 32) ? b : b - 64;
      if (k == 0 || k > 26 || k < -26) begin
        in_s.re = 16'(int'($urandom % 201) - 100); in_s.im = 16'(int'($urandom % 201) - 100);
      end else begin
        yr = hr[b] * xr[b] - hi[b] * xi[b];
        yi = hr[b] * xi[b] + hi[b] * xr[b];
        cr = yr * $cos(phi) - yi * $sin(phi);
        ci = yr * $sin(phi) + yi * $cos(phi);
        in_s.re = 16'($rtoi(cr)); in_s.im = 16'($rtoi(ci));
      end
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    busy_cyc = 0;
    @(posedge sym_done);
    @(negedge clk);
    checks++;
    if (busy_cyc != 110) begin failures++; $display("symbol took %0d cycles", busy_cyc); end
    begin
      real est = real'(theta) / 65536.0 * 2.0 * PI;
      real d = est - phi;
      if (d > PI) d -= 2.0 * PI;
      if (d < -PI) d += 2.0 * PI;
      checks++;
      if (rabs(d) > 0.01) begin failures++; $display("phase %f exp %f", est, phi); end
    end
  endtask

  initial begin
    int d = 0;
    for (int k = -26; k <= 26; k++)
      if (k != 0 && k != -21 && k != -7 && k != 7 && k != 21) begin dk_exp[d] = k; d++; end
    repeat (2) @(posedge clk); rst_n = 1;
    symbol(1, 0.3);
    symbol(2, -2.0);
    symbol(3, 2.9);
    repeat (2) @(negedge clk);
    checks++;
    if (nout != 144) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
