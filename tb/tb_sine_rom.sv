// tb_sine_rom: every entry of the table against 32767*sin(2*pi*k/1024) and
// 32767*cos(2*pi*k/1024) computed here in real arithmetic (tolerance 1 LSB).
module tb_sine_rom;
  logic [9:0] phase;
  logic signed [15:0] sin_o, cos_o;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  sine_rom dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 1024; k++) begin
      real s, c;
      phase = 10'(k); #1;
      s = 32767.0 * $sin(2.0 * 3.14159265358979 * k / 1024.0);
      c = 32767.0 * $cos(2.0 * 3.14159265358979 * k / 1024.0);
      checks++;
      if (rabs(real'(sin_o) - s) > 1.0 || rabs(real'(cos_o) - c) > 1.0) begin
        failures++; $display("k=%0d sin %0d cos %0d", k, sin_o, cos_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
