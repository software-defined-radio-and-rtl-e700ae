// tb_montium_tile: configures a whole tile through its configuration port and
// runs a multiply-accumulate program: ALU1 multiplies a word read from local
// memory M01 by a word streamed in on CCU lane 1 and adds the accumulator that
// ALU2 holds in its register file and passes over the East-West link; the
// sum goes back over a global bus. After N products the accumulator leaves
// through the CCU output. The input lane has random gaps and the output
// random back-pressure, so the CCU stalls the tile; the result, the consumed
// stream length and the stall-free cycle count (N + 3) are checked.
// A second program then uses local memory M03 as a lookup table: indices
// streamed on lane 2 pass through ALU1 and address the table (base + index);
// every entry read out is checked.
module tb_montium_tile;
  import montium_pkg::*;
  localparam int N = 20;
  localparam int M = 40;   // lookups in the second program

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

  word_t mvals [N+1];
  word_t svals [N+1];
  int    consumed, outs, cyc_run, cyc_stall;
  word_t got;

  initial begin
    xbar_entry_t x0, x1; reg_entry_t r0, r1; mem_entry_t m0, m1; alu_entry_t a0;
    instr_t p [4];
    longint expsum;
    in_data = '0; in_valid = '0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // data: M01[i] and the lane-1 stream
    expsum = 0;
    for (int i = 0; i <= N; i++) begin
      mvals[i] = word_t'(int'($urandom % 201) - 100);
      svals[i] = word_t'(int'($urandom % 201) - 100);
      cfg(make_cfg_addr(R_MEMDAT, 0, 0) | 16'(i), mvals[i]);
      if (i < N) expsum += longint'(mvals[i]) * longint'(svals[i]);
    end
    // crossbar: bus0 = M01, bus1 = CCU lane 1, bus2 = ALU1.out1, bus3 = ALU2.out1
    x0 = '0; x0.src[0] = SRC_MEM0; x0.src[1] = SRC_CCU; x0.src[2] = SRC_ALU0;
    x0.src[3] = SRC_ALU0 + 5'd2;
    x1 = '0; x1.src[3] = SRC_ALU0 + 5'd2;
    // registers: ALU1.A <= bus0, ALU1.C <= bus1, ALU2.A <= bus2
    r0 = '0;
    r0.rf[0][0].we = 1; r0.rf[0][0].bus = 4'd0;
    r0.rf[0][2].we = 1; r0.rf[0][2].bus = 4'd1;
    r0.rf[1][0].we = 1; r0.rf[1][0].bus = 4'd2;
    r1 = '0;
    m0 = '0; m0.m[0].step = 1;
    m1 = '0;
    // ALU1: A*C + East; ALU2: pass A (to West)
    a0 = '0;
    a0.a[0].mul = MUL_INT; a0.a[0].add_src = ADD_EAST;
    a0.a[1].mul = MUL_OFF; a0.a[1].add_src = ADD_ZERO;
    put_entry(R_XBAR, 0, 256'(x0), $bits(x0));
    put_entry(R_XBAR, 1, 256'(x1), $bits(x1));
    put_entry(R_REGDEC, 0, 256'(r0), $bits(r0));
    put_entry(R_REGDEC, 1, 256'(r1), $bits(r1));
    put_entry(R_MEMDEC, 0, 256'(m0), $bits(m0));
    put_entry(R_MEMDEC, 1, 256'(m1), $bits(m1));
    put_entry(R_ALUDEC, 0, 256'(a0), $bits(a0));
    p[0] = '0; p[0].op = SQ_SETLC; p[0].count = 10'(N - 1);
    p[1] = '0; p[1].op = SQ_LOOP;  p[1].target = 6'd1;
    p[2] = '0; p[2].op = SQ_NEXT;  p[2].xbar_i = 5'd1; p[2].reg_i = 5'd1;
    p[2].mem_i = 5'd1; p[2].out_en = 1; p[2].out_bus = 4'd3;
    p[3] = '0; p[3].op = SQ_HALT; p[3].xbar_i = 5'd1; p[3].reg_i = 5'd1; p[3].mem_i = 5'd1;
    for (int i = 0; i < 4; i++) put_entry(R_PROG, i, 256'(p[i]), $bits(instr_t));
    cfg(make_cfg_addr(R_CTRL, 0, 0), 16'd1);
    // run with random lane gaps and output back-pressure
    consumed = 0; outs = 0; cyc_run = 0; cyc_stall = 0;
    while (!done) begin
      @(negedge clk);
      in_valid = '0;
      in_valid[1] = (consumed <= N) && (($urandom % 3) != 0);
      in_data[1] = svals[consumed > N ? N : consumed];
      out_ready = ($urandom % 2) != 0;
      #1;
      if (running) cyc_run++;
      if (stall) cyc_stall++;
      @(posedge clk);
      if (in_valid[1] && in_ready[1]) consumed++;
      if (out_valid && out_ready) begin outs++; got = out_data; end
    end
    checks++;
    if (outs != 1 || got !== word_t'(expsum)) begin
      failures++; $display("result %0d exp %0d (outs %0d)", got, word_t'(expsum), outs);
    end
    checks++;
    if (consumed != N + 1) begin failures++; $display("consumed %0d", consumed); end
    checks++;
    if (cyc_run - cyc_stall != N + 3) begin
      failures++; $display("cycles %0d stalls %0d", cyc_run, cyc_stall);
    end
    checks++;
    if (cyc_stall == 0) begin failures++; $display("no stall exercised"); end
    $display("tile: %0d cycles, %0d stalled", cyc_run, cyc_stall);
    // Second program: local memory M03 as a lookup table. Indices arrive on
    // lane 2 (bus 2) into register file A of ALU1, which passes them on out1
    // to M03's index; M03 reads base 64 + index and bus 3 carries the entry
    // to the output. One lookup per cycle, one cycle behind its index.
    begin
      xbar_entry_t x2, x4; mem_entry_t m2; reg_entry_t r2; alu_entry_t a1;
      word_t tbl [64];
      logic [15:0] idx [M];
      int nin, k;
      for (int i = 0; i < 64; i++) begin
        tbl[i] = word_t'(i * i * 7 - 9000);
        cfg(make_cfg_addr(R_MEMDAT, 0, 0) | 16'((2 << 9) | (64 + i)), tbl[i]);
      end
      cfg(make_cfg_addr(R_AGU, 2, 0), 16'd64);
      for (int i = 0; i < M; i++) idx[i] = 16'(($urandom % 64) | ($urandom << 9));
      x2 = '0; x2.src[2] = SRC_CCU; x2.src[3] = SRC_MEM0 + 5'd2;
      x4 = '0; x4.src[3] = SRC_MEM0 + 5'd2;
      m2 = '0; m2.m[2].lut = 1; m2.m[2].abus = 4'd0;
      r2 = '0; r2.rf[0][0].we = 1; r2.rf[0][0].bus = 4'd2;
      a1 = '0; a1.a[0].fu1 = FU_PASSX; a1.a[0].fu3 = FU_PASSX;
      a1.a[0].mul = MUL_OFF; a1.a[0].add_src = ADD_ZERO;
      put_entry(R_XBAR, 2, 256'(x2), $bits(x2));
      put_entry(R_XBAR, 4, 256'(x4), $bits(x4));
      put_entry(R_MEMDEC, 2, 256'(m2), $bits(m2));
      put_entry(R_REGDEC, 2, 256'(r2), $bits(r2));
      put_entry(R_ALUDEC, 1, 256'(a1), $bits(a1));
      // take index 0; M-1 times: take the next index, output a lookup;
      // output the last lookup; halt
      p[0] = '0; p[0].op = SQ_SETLC; p[0].count = 10'(M - 2);
      p[0].xbar_i = 5'd2; p[0].mem_i = 5'd3; p[0].reg_i = 5'd2; p[0].alu_i = 5'd1;
      p[1] = '0; p[1].op = SQ_LOOP; p[1].target = 6'd1;
      p[1].xbar_i = 5'd2; p[1].mem_i = 5'd2; p[1].reg_i = 5'd2; p[1].alu_i = 5'd1;
      p[1].out_en = 1; p[1].out_bus = 4'd3;
      p[2] = '0; p[2].op = SQ_NEXT;
      p[2].xbar_i = 5'd4; p[2].mem_i = 5'd2; p[2].reg_i = 5'd3; p[2].alu_i = 5'd1;
      p[2].out_en = 1; p[2].out_bus = 4'd3;
      p[3] = '0; p[3].op = SQ_HALT;
      p[3].xbar_i = 5'd3; p[3].mem_i = 5'd3; p[3].reg_i = 5'd3;
      for (int i = 0; i < 4; i++) put_entry(R_PROG, i, 256'(p[i]), $bits(instr_t));
      cfg(make_cfg_addr(R_CTRL, 0, 0), 16'd1);
      nin = 0; k = 0;
      while (!done) begin
        @(negedge clk);
        in_valid = '0;
        in_valid[2] = (nin < M) && (($urandom % 3) != 0);
        in_data[2] = word_t'(idx[nin < M ? nin : M - 1]);
        out_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (in_valid[2] && in_ready[2]) nin++;
        if (out_valid && out_ready) begin
          checks++;
          if (k >= M || out_data !== tbl[idx[k][5:0]]) begin
            failures++; $display("lookup %0d: got %0d", k, out_data);
          end
          k++;
        end
      end
      checks++;
      if (k != M || nin != M) begin failures++; $display("lookups %0d inputs %0d", k, nin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
