// tb_pulse_shape_filter: random 16-tap filter and random complex samples with
// random input gaps and output back-pressure; every output sample is compared
// with the convolution computed here (rounded, saturated).
module tb_pulse_shape_filter;
  import sdr_pkg::*;
  localparam int NT = 16;
  logic clk = 0, rst_n = 0, coef_we = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [3:0] coef_addr = 0; logic signed [15:0] coef_val = 0;
  cplx16_t in_s, out_s;
  int checks = 0, failures = 0;
  longint h [NT];
  longint xr [$], xi [$];
  int nin = 0, nout = 0;

  always #5 clk = ~clk;
  pulse_shape_filter #(.NTAPS(NT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rs(longint v);
    longint r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      longint ar, ai;
      logic signed [15:0] orr, oi;
      ar = 0; ai = 0;
      for (int t = 0; t < NT; t++)
        if (nout - t >= 0) begin ar += h[t] * xr[nout - t]; ai += h[t] * xi[nout - t]; end
      orr = out_s.re; oi = out_s.im;
      checks++;
      if (longint'(orr) != rs(ar) || longint'(oi) != rs(ai)) begin
        failures++; $display("out %0d: %0d,%0d exp %0d,%0d", nout, orr, oi, rs(ar), rs(ai));
      end
      nout++;
    end
    if (in_valid && in_ready) nin++;
  end

  initial begin
    in_s = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk); coef_we = 1; coef_addr = 4'(t);
      coef_val = 16'(int'($urandom % 16001) - 8000); h[t] = longint'(coef_val);
    end
    @(negedge clk); coef_we = 0;
    for (int n = 0; n < 300; n++) begin
      xr.push_back(longint'(int'($urandom % 40001) - 20000));
      xi.push_back(longint'(int'($urandom % 40001) - 20000));
    end
    xr[100] = 32767; xi[100] = -32768;   // large values to exercise saturation
    while (nout < 300) begin
      in_valid = (nin < 300) && ($urandom % 4 != 0);
      in_s.re = 16'(xr[nin < 300 ? nin : 299]); in_s.im = 16'(xi[nin < 300 ? nin : 299]);
      out_ready = $urandom % 3 != 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
