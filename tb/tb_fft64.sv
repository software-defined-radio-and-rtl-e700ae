// tb_fft64: three OFDM symbols of random complex samples. Each output bin is
// compared with DFT(x)[k]/64 computed here in real arithmetic (tolerance
// 6 LSB for the per-stage truncation). Also checks that the transform phase
// lasts 204 cycles and that bins come out in natural order.
module tb_fft64;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, computing;
  cplx16_t in_s, out_s; logic [5:0] out_idx;
  int checks = 0, failures = 0;
  real xr [64], xi [64];
  int ccount = 0, nout = 0;
  localparam real PI = 3.14159265358979;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  always #5 clk = ~clk;
  fft64 dut (.*);

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (computing) ccount++;
    if (out_valid) begin
      real er, ei;
      logic signed [15:0] ore, oim;
      int k;
      k = nout % 64;
      er = 0; ei = 0;
      for (int n = 0; n < 64; n++) begin
        er += xr[n] * $cos(2.0 * PI * k * n / 64.0) + xi[n] * $sin(2.0 * PI * k * n / 64.0);
        ei += xi[n] * $cos(2.0 * PI * k * n / 64.0) - xr[n] * $sin(2.0 * PI * k * n / 64.0);
      end
      er /= 64.0; ei /= 64.0;
      ore = out_s.re; oim = out_s.im;
      checks++;
      if (int'(out_idx) != k || rabs(real'(ore) - er) > 6.0 || rabs(real'(oim) - ei) > 6.0) begin
        failures++;
        if (failures < 80 && k < 4) $display("s%0d bin", nout/64, " %0d (idx %0d): %0d,%0d exp %f,%f", k, out_idx, ore, oim, er, ei);
      end
      nout++;
    end
  end

  initial begin
    in_s = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        int r, i;
        r = int'($urandom % 16001) - 8000;
        i = int'($urandom % 16001) - 8000;
        if (s == 1) begin   // a pure tone in bin 5 plus a DC offset
          r = $rtoi(7000.0 * $cos(2.0 * PI * 5 * n / 64.0)) + 3000;
          i = $rtoi(7000.0 * $sin(2.0 * PI * 5 * n / 64.0));
        end
        xr[n] = r; xi[n] = i;
        in_s.re = 16'(r); in_s.im = 16'(i); in_valid = 1;
        @(negedge clk);
      end
      in_valid = 0;
      ccount = 0;
      while (nout < 64 * (s + 1)) @(negedge clk);
      checks++;
      if (ccount != 204) begin failures++; $display("transform took %0d cycles", ccount); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
