// tb_freq_offset_corr: a tone rotated by a known frequency offset is
// corrected back. The input is A*exp(j*(2*pi*f*n + phi0)) with the same
// per-sample phase step the host programs; the output must be the constant
// A*exp(j*phi0) within a few LSB, for two symbols of 64 samples. Also checks
// that a 64-sample symbol takes 67 cycles from first input to last output.
module tb_freq_offset_corr;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, inc_we = 0, sof = 0, in_valid = 0;
  logic [15:0] inc_val = 0;
  cplx16_t in_s, out_s;
  logic out_valid;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  int cyc = 0, first_in = -1, last_out = -1, nout = 0;
  localparam real PI = 3.14159265358979;

  always #5 clk = ~clk;
  freq_offset_corr dut (.*);

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real phi0 = 0.7, amp = 12000.0;

  // one block samples both sides at the clock edge, counting cycles
  always @(posedge clk) begin
    real er, ei;
    logic signed [15:0] ore, oim;
    if (in_valid && first_in < 0) first_in = cyc;
    if (out_valid) begin
      er = amp * $cos(phi0); ei = amp * $sin(phi0);
      ore = out_s.re; oim = out_s.im;
      checks++;
      nout++;
      if (nout == 64) last_out = cyc;
      if (rabs(real'(ore) - er) > 60.0 || rabs(real'(oim) - ei) > 60.0) begin
        failures++; $display("out %0d,%0d exp %f,%f", ore, oim, er, ei);
      end
    end
    cyc++;
  end

  initial begin
    int inc;
    in_s = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    inc = 16'd1234;   // 1234/65536 turn per sample
    @(negedge clk); inc_we = 1; inc_val = 16'(inc);
    @(negedge clk); inc_we = 0;
    for (int n = 0; n < 128; n++) begin
      real th;
      // the correction uses the top 10 phase bits; build the input with the
      // exact offset so the residual error is the table quantisation
      th = 2.0 * PI * real'(n * inc % 65536) / 65536.0 + phi0;
      in_valid = 1; sof = (n == 0);
      in_s.re = 16'($rtoi(amp * $cos(th)));
      in_s.im = 16'($rtoi(amp * $sin(th)));
      @(negedge clk);
    end
    in_valid = 0; sof = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 128) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of the first symbol: inputs in cycles c..c+63, last output c+66
  initial begin
    wait (last_out >= 0);
    checks++;
    if (last_out - first_in + 1 != 67) begin
      failures++; $display("symbol took %0d cycles", last_out - first_in + 1);
    end
  end
endmodule
