// tb_montium_sequencer: loads a small program (set loop counter, a loop body
// of two instructions, a jump over a dead instruction, halt), runs it with
// random stalls and checks the pc trace against an independent model, the
// instruction count and done.
module tb_montium_sequencer;
  import montium_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, cfg_we = 0;
  logic [PROG_AW-1:0] cfg_entry = 0, pc; logic [3:0] cfg_word = 0;
  logic [15:0] cfg_wdata = 0;
  instr_t instr; logic running, done;
  instr_t prog [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  montium_sequencer dut (.*);

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(sq_op_e op, int tgt, int cnt, int tag);
    instr_t i;
    i = '0; i.op = op; i.target = PROG_AW'(tgt); i.count = 10'(cnt);
    i.alu_i = DEC_IW'(tag);
    return i;
  endfunction

  initial begin
    int mpc, mlc, issued;
    prog[0] = mk(SQ_SETLC, 0, 4, 1);   // lc = 4
    prog[1] = mk(SQ_NEXT, 0, 0, 2);    // body
    prog[2] = mk(SQ_LOOP, 1, 0, 3);    // back to 1 while lc != 0
    prog[3] = mk(SQ_JUMP, 5, 0, 4);
    prog[4] = mk(SQ_HALT, 0, 0, 5);    // skipped
    prog[5] = mk(SQ_NEXT, 0, 0, 6);
    prog[6] = mk(SQ_HALT, 0, 0, 7);
    prog[7] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++)
      for (int w = 0; w < 3; w++) begin
        @(negedge clk); cfg_we = 1; cfg_entry = PROG_AW'(i); cfg_word = 4'(w);
        cfg_wdata = 16'(48'(prog[i]) >> (16 * w));
      end
    @(negedge clk); cfg_we = 0; start = 1;
    @(negedge clk); start = 0;
    mpc = 0; mlc = 0; issued = 0;
    while (1) begin
      en = ($urandom % 3) != 0;
      #1; checks++;
      if (int'(pc) != mpc || instr !== prog[mpc] || !running) begin
        failures++; $display("pc %0d exp %0d", pc, mpc);
      end
      @(posedge clk);
      if (en) begin
        issued++;
        case (prog[mpc].op)
          SQ_SETLC: begin mlc = int'(prog[mpc].count); mpc++; end
          SQ_LOOP:  if (mlc != 0) begin mlc--; mpc = int'(prog[mpc].target); end else mpc++;
          SQ_JUMP:  mpc = int'(prog[mpc].target);
          SQ_HALT:  mpc = -1;
          default:  mpc++;
        endcase
      end
      @(negedge clk);
      if (mpc < 0) break;
    end
    checks++;
    // 1 setlc + 5 x (body, loop) + jump + next + halt = 14 issued instructions
    if (issued != 14 || !done || running) begin
      failures++; $display("issued %0d done %b", issued, done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
