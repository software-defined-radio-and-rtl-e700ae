// tb_scrambling_code_gen: checks the generated complex code against a
// reference built here from the LFSR recurrences alone: the I chip is
// z_n(i) = x(i+n) ^ y(i) and the Q chip is z_n((i + 131072) mod (2^18 - 1)),
// obtained by stepping the reference registers. Checks code 0 and code 5,
// random back-pressure, the seek time and the restart after CODE_LEN chips
// (shortened to 300 here).
module tb_scrambling_code_gen;
  localparam int LEN = 300;
  localparam int PER = 262143;
  logic clk = 0, rst_n = 0, start = 0, ready = 0;
  logic [12:0] code_n = 0;
  logic valid, busy, c_i, c_q;
  int checks = 0, failures = 0;
  bit xs [PER + 200000];
  bit ys [PER + 200000];

  always #5 clk = ~clk;
  scrambling_code_gen #(.CODE_LEN(LEN)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit zref(int n, int i);
    return xs[(i + n) % PER] ^ ys[i % PER];
  endfunction

  task automatic run_code(int n);
    int i, seek;
    @(negedge clk); start = 1; code_n = 13'(n);
    @(negedge clk); start = 0;
    seek = 0;
    while (!valid) begin @(negedge clk); seek++; end
    checks++;
    if (seek != n + 1) begin failures++; $display("seek %0d cycles for n=%0d", seek, n); end
    i = 0;
    while (i < LEN + 40) begin
      int k;
      ready = ($urandom % 4) != 0;
      k = i % LEN;
      #1; checks++;
      if (c_i !== zref(n, k) || c_q !== zref(n, (k + 131072) % PER)) begin
        failures++;
        if (failures < 10) $display("n=%0d chip %0d: %b%b exp %b%b", n, k, c_i, c_q,
                                    zref(n, k), zref(n, (k + 131072) % PER));
      end
      @(posedge clk);
      if (ready) i++;
      @(negedge clk);
    end
    ready = 0;
  endtask

  initial begin
    // reference sequences
    for (int k = 0; k < 18; k++) begin xs[k] = (k == 0); ys[k] = 1; end
    for (int k = 0; k + 18 < PER + 200000; k++) begin
      xs[k+18] = xs[k+7] ^ xs[k];
      ys[k+18] = ys[k+10] ^ ys[k+7] ^ ys[k+5] ^ ys[k];
    end
    repeat (2) @(posedge clk); rst_n = 1;
    run_code(0);
    run_code(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
