// tb_montium_crossbar: random source codes on all ten buses, each bus checked
// against the memory, ALU or CCU value its code selects (or zero).
module tb_montium_crossbar;
  import montium_pkg::*;
  xbar_entry_t sel;
  word_t [NMEM-1:0] mem_rdata;
  word_t [2*NPP-1:0] alu_out;
  word_t [NBUS-1:0] ccu_lane, bus;
  int checks = 0, failures = 0;

  montium_crossbar dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < NBUS; b++) begin
        sel.src[b] = 5'($urandom % 24);
        ccu_lane[b] = word_t'($urandom);
      end
      for (int m = 0; m < NMEM; m++) mem_rdata[m] = word_t'($urandom);
      for (int a = 0; a < 2*NPP; a++) alu_out[a] = word_t'($urandom);
      #1;
      for (int b = 0; b < NBUS; b++) begin
        word_t e;
        int s;
        s = int'(sel.src[b]);
        if (s >= 1 && s <= 10) e = mem_rdata[s-1];
        else if (s >= 11 && s <= 20) e = alu_out[s-11];
        else if (s == 21) e = ccu_lane[b];
        else e = '0;
        checks++;
        if (bus[b] !== e) begin failures++; $display("bus %0d src %0d got %h exp %h", b, s, bus[b], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
