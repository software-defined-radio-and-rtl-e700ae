// tb_montium_fir: the Montium tile programmed as a streaming 5-tap FIR filter
// (the kind of filter the pulse-shaping stage needs), one output per cycle.
//
// Mapping: ALU p (p = 0..4) holds tap h[p] in input register file C and the
// delayed sample x[n-1-p] in register file B. FU1 passes B, FU2 passes C, the
// Q1.15 multiplier forms h[p] * x, and the adder adds the East input. The
// East-West chain therefore sums all five products in one cycle, and ALU0's
// out1 is the filter output. The delay line is also built from the tile's own
// paths: ALU p hands its B operand (out2 = FU1) over global bus p+1 into
// register file B of ALU p+1. The input arrives on CCU lane 0 and the result
// leaves through the CCU output.
//
// Program: load the taps from memories M01..M05 into the register files, set
// the loop counter, then repeat one instruction N+1 times, and halt.
// The input lane has random gaps and the output random back-pressure, so the
// CCU stalls the tile. Checks every output against a model with the same
// rounding and saturation, the count of outputs and inputs, and that the
// sequencer issued exactly N+4 instructions (taps, loop set-up, N+1 filter
// cycles, halt): one output per unstalled cycle.
module tb_montium_fir;
  import montium_pkg::*;
  localparam int N  = 60;
  localparam int NT = 5;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [15:0] cfg_addr = 0, cfg_wdata = 0;
  word_t [NBUS-1:0] in_data; logic [NBUS-1:0] in_valid, in_ready;
  word_t out_data; logic out_valid, out_ready, running, done, stall;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  montium_tile dut (.*);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(logic [15:0] a, logic [15:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic put_entry(logic [2:0] region, int entry, logic [255:0] bits, int nbits);
    for (int w = 0; w < (nbits + 15) / 16; w++)
      cfg(make_cfg_addr(region, entry, w), bits[16*w +: 16]);
  endtask

  function automatic word_t qmul(word_t a, word_t b);
    longint p;
    p = (longint'(a) * longint'(b) + 16384) >>> 15;
    return (p > 32767) ? 16'sh7fff : word_t'(p);
  endfunction

  function automatic word_t sat_add(word_t a, word_t b);
    int s;
    s = int'(a) + int'(b);
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return word_t'(s);
  endfunction

  word_t h [NT];
  word_t x [N+1];
  word_t got [$];
  int    consumed, cyc_run, cyc_stall;
  int    issued = 0;

  // instructions the sequencer completed (a clock edge while running, not stalled)
  always @(posedge clk) if (rst_n && running && !stall) issued++;

  initial begin
    xbar_entry_t x0, x1; reg_entry_t r0, r1; mem_entry_t m0; alu_entry_t a0;
    instr_t p [4];
    in_data = '0; in_valid = '0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // taps in M01..M05, address 0; random samples, some large enough to saturate
    for (int t = 0; t < NT; t++) begin
      h[t] = word_t'($urandom);
      cfg(make_cfg_addr(R_MEMDAT, 0, 0) | 16'(t << 9), h[t]);
    end
    for (int i = 0; i <= N; i++) x[i] = word_t'($urandom);
    // entry 0: bus 2+t = memory t, register file C of ALU t <= bus 2+t
    x0 = '0; r0 = '0;
    for (int t = 0; t < NT; t++) begin
      x0.src[2+t] = SRC_MEM0 + 5'(t);
      r0.rf[t][2].we = 1; r0.rf[t][2].bus = 4'(2 + t);
    end
    // entry 1: bus 0 = lane 0, bus t = ALU(t-1).out2, bus 5 = ALU0.out1;
    // register file B of ALU t <= bus t
    x1 = '0; r1 = '0;
    x1.src[0] = SRC_CCU;
    for (int t = 1; t < NT; t++) x1.src[t] = SRC_ALU0 + 5'(2 * (t - 1) + 1);
    x1.src[5] = SRC_ALU0;
    for (int t = 0; t < NT; t++) begin
      r1.rf[t][1].we = 1; r1.rf[t][1].bus = 4'(t);
    end
    m0 = '0;
    a0 = '0;
    for (int t = 0; t < NT; t++) begin
      a0.a[t].fu1 = FU_PASSY; a0.a[t].fu2 = FU_PASSX;
      a0.a[t].fu3 = FU_PASSX; a0.a[t].fu4 = FU_PASSX;
      a0.a[t].mul = MUL_FRAC; a0.a[t].add_src = ADD_EAST;
      a0.a[t].sat = 1'b1;     a0.a[t].out2 = O2_FU1;
    end
    put_entry(R_XBAR, 0, 256'(x0), $bits(x0));
    put_entry(R_XBAR, 1, 256'(x1), $bits(x1));
    put_entry(R_REGDEC, 0, 256'(r0), $bits(r0));
    put_entry(R_REGDEC, 1, 256'(r1), $bits(r1));
    put_entry(R_MEMDEC, 0, 256'(m0), $bits(m0));
    put_entry(R_ALUDEC, 0, 256'(a0), $bits(a0));
    p[0] = '0; p[0].op = SQ_NEXT;
    p[1] = '0; p[1].op = SQ_SETLC; p[1].count = 10'(N);
    p[2] = '0; p[2].op = SQ_LOOP;  p[2].target = 6'd2;
    p[2].xbar_i = 5'd1; p[2].reg_i = 5'd1; p[2].out_en = 1; p[2].out_bus = 4'd5;
    p[3] = '0; p[3].op = SQ_HALT;
    for (int i = 0; i < 4; i++) put_entry(R_PROG, i, 256'(p[i]), $bits(instr_t));
    cfg(make_cfg_addr(R_CTRL, 0, 0), 16'd1);
    consumed = 0; cyc_run = 0; cyc_stall = 0;
    while (!done) begin
      @(negedge clk);
      in_valid = '0;
      in_valid[0] = (consumed <= N) && (($urandom % 4) != 0);
      in_data[0] = x[consumed > N ? N : consumed];
      out_ready = ($urandom % 3) != 0;
      #1;
      if (running) cyc_run++;
      if (stall) cyc_stall++;
      @(posedge clk);
      if (in_valid[0] && in_ready[0]) consumed++;
      if (out_valid && out_ready) got.push_back(out_data);
    end
    // output j is y[j-1]; y[-1] = 0 (register files start cleared)
    checks++;
    if (got.size() != N + 1) begin
      failures++; $display("outputs %0d, expected %0d", got.size(), N + 1);
    end
    for (int j = 0; j < got.size() && j <= N; j++) begin
      word_t acc;
      acc = '0;
      for (int t = NT - 1; t >= 0; t--)
        acc = sat_add(qmul(h[t], (j - 1 - t >= 0) ? x[j-1-t] : '0), acc);
      checks++;
      if (got[j] !== acc) begin
        failures++; $display("y[%0d] = %0d, expected %0d", j - 1, got[j], acc);
      end
    end
    checks++;
    if (consumed != N + 1) begin failures++; $display("consumed %0d", consumed); end
    checks++;
    if (issued != N + 4) begin
      failures++; $display("issued %0d instructions, expected %0d", issued, N + 4);
    end
    checks++;
    if (cyc_stall == 0) begin failures++; $display("no stall exercised"); end
    $display("tile FIR: %0d outputs, %0d cycles, %0d stalled", got.size(), cyc_run, cyc_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
