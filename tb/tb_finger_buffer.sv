// tb_finger_buffer: streams 1500 numbered chips through the buffer with four
// different path delays (including 0 and 511) and random gaps; each tap must
// present the chip its delay names. Changes the delay profile mid-stream.
module tb_finger_buffer;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, delay_we = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [1:0] delay_f = 0; logic [8:0] delay_val = 0;
  cplx16_t in_s; cplx16_t [3:0] taps;
  int checks = 0, failures = 0;
  int dl [4];

  always #5 clk = ~clk;
  finger_buffer #(.NF(4), .DEPTH(512)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_delays(int d0, int d1, int d2, int d3);
    dl = '{d0, d1, d2, d3};
    for (int f = 0; f < 4; f++) begin
      @(negedge clk); delay_we = 1; delay_f = 2'(f); delay_val = 9'(dl[f]);
    end
    @(negedge clk); delay_we = 0;
  endtask

  initial begin
    int n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    set_delays(0, 3, 40, 511);
    while (n < 1500) begin
      if (n == 800) begin in_valid = 0; set_delays(7, 0, 200, 1); end
      in_valid = $urandom % 5 != 0; out_ready = $urandom % 5 != 0;
      in_s.re = 16'(n); in_s.im = 16'(~n);
      #1;
      if (in_valid && out_ready) begin
        for (int f = 0; f < 4; f++)
          if (n - dl[f] >= 0) begin
            checks++;
            if (taps[f].re !== 16'(n - dl[f]) || taps[f].im !== 16'(~(n - dl[f]))) begin
              failures++; $display("chip %0d finger %0d got %0d", n, f, taps[f].re);
            end
          end
      end
      @(posedge clk);
      if (in_valid && out_ready) n++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
