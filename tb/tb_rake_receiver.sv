// tb_rake_receiver: drives the RAKE receiver with chips built here from QPSK
// symbols, per-finger complex path gains, a spreading code and a random
// complex scrambling code. Checks per symbol: the combined soft value against
// an exact integer model (de-scramble, de-spread, conj(w) * acc, >> 15), the
// de-mapped bits against the transmitted ones, and the symbol period
// (4*SF + 5 cycles with 4 fingers, 2*SF + 3 with 2). Runs SF = 16 with 4
// fingers, then SF = 8 with 2 fingers after a reconfiguration of SF + 1
// writes, then SF = 4 with gaps in the chip stream (stall).
module tb_rake_receiver;
  import sdr_pkg::*;
  localparam int NF = 4;

  logic clk = 0, rst_n = 0;
  logic code_we = 0, code_bit = 0, const_we = 0;
  logic [8:0] code_addr = 0; logic [9:0] sf_val = 0; logic [2:0] nf_val = 0;
  logic chip_valid = 0, chip_ready, sc_i = 0, sc_q = 0;
  cplx16_t [NF-1:0] chip, coef;
  logic coef_valid = 0, coef_ready, sym_valid, stall, busy;
  logic [1:0] sym_bits; logic signed [31:0] sym_re, sym_im;
  int checks = 0, failures = 0;
  int cyc = 0, last_sym = -1, stalls = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (stall) stalls++; end

  rake_receiver #(.NF(NF), .SF_MAX(512)) dut (.*);

  initial begin
    repeat (60000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sf, nf;
  bit code [512];

  task automatic configure(int new_sf, int new_nf);
    int writes = 0;
    for (int k = 0; k < new_sf; k++) begin
      @(negedge clk); code_we = 1; code_addr = 9'(k); code_bit = 1'($urandom);
      code[k] = code_bit; writes++;
    end
    @(negedge clk); code_we = 0; const_we = 1; sf_val = 10'(new_sf); nf_val = 3'(new_nf);
    writes++;
    @(negedge clk); const_we = 0;
    sf = new_sf; nf = new_nf;
    checks++;
    if (writes != new_sf + 1) failures++;
  endtask

  // one symbol: build chips, stream them, collect the result
  task automatic symbol(bit gaps);
    longint g_re [NF], g_im [NF], acc_re [NF], acc_im [NF];
    longint er, ei, sr, si, p;
    int b0, b1, k, f, start_cyc;
    cplx16_t w [NF];
    b0 = $urandom % 2; b1 = $urandom % 2;
    for (f = 0; f < NF; f++) begin
      g_re[f] = int'($urandom % 3001) - 1500; g_im[f] = int'($urandom % 3001) - 1500;
      w[f].re = 16'(g_re[f] * 8); w[f].im = 16'(g_im[f] * 8);
      acc_re[f] = 0; acc_im[f] = 0;
    end
    coef = {w[3], w[2], w[1], w[0]};
    coef_valid = 1;
    for (k = 0; k < sf; k++) begin
      bit ci, cq;
      longint sre, sim, cr, cim, dre, dim, m;
      ci = 1'($urandom); cq = 1'($urandom);
      cr = ci ? -1 : 1; cim = cq ? -1 : 1; m = code[k] ? -1 : 1;
      for (f = 0; f < NF; f++) begin
        // transmitted s_f = g_f * sym, sym = (b0 ? -1 : 1) + j (b1 ? -1 : 1)
        sre = g_re[f] * (b0 ? -1 : 1) - g_im[f] * (b1 ? -1 : 1);
        sim = g_re[f] * (b1 ? -1 : 1) + g_im[f] * (b0 ? -1 : 1);
        // chip = s_f * c * code, plus a small disturbance
        dre = m * (sre * cr - sim * cim) + int'($urandom % 21) - 10;
        dim = m * (sre * cim + sim * cr) + int'($urandom % 21) - 10;
        chip[f].re = 16'(dre); chip[f].im = 16'(dim);
        // reference de-scramble and de-spread
        if (f < nf) begin
          acc_re[f] += m * (dre * cr + dim * cim);
          acc_im[f] += m * (dim * cr - dre * cim);
        end
      end
      sc_i = ci; sc_q = cq;
      if (gaps) begin
        chip_valid = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      chip_valid = 1;
      do @(posedge clk); while (!chip_ready);
      @(negedge clk);
    end
    chip_valid = 0;
    sr = 0; si = 0;
    for (f = 0; f < nf; f++) begin
      sr += acc_re[f] * longint'(w[f].re) + acc_im[f] * longint'(w[f].im);
      si += acc_im[f] * longint'(w[f].re) - acc_re[f] * longint'(w[f].im);
    end
    er = sr >>> 15; ei = si >>> 15;
    while (!sym_valid) @(posedge clk) #1;
    coef_valid = 0;
    checks++;
    if (longint'(sym_re) != er || longint'(sym_im) != ei) begin
      failures++; $display("soft %0d,%0d exp %0d,%0d", sym_re, sym_im, er, ei);
    end
    checks++;
    if (sym_bits !== {1'(b1), 1'(b0)}) begin
      failures++; $display("bits %b exp %b%b", sym_bits, b1, b0);
    end
    if (!gaps) begin
      p = cyc - last_sym;
      if (last_sym >= 0) begin
        checks++;
        if (p != nf * sf + nf + 1) begin
          failures++; $display("period %0d exp %0d", p, nf * sf + nf + 1);
        end
      end
      last_sym = cyc;
    end
    @(negedge clk);
  endtask

  initial begin
    // symbols are streamed back to back: chip data for the next symbol is
    // offered as soon as the previous one has been combined
    repeat (2) @(posedge clk); rst_n = 1;
    configure(16, 4);
    for (int s = 0; s < 6; s++) symbol(0);
    while (busy) @(negedge clk);
    last_sym = -1;
    configure(8, 2);
    for (int s = 0; s < 6; s++) symbol(0);
    while (busy) @(negedge clk);
    configure(4, 4);
    for (int s = 0; s < 6; s++) symbol(1);
    checks++;
    if (stalls == 0) begin failures++; $display("stall never seen"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
