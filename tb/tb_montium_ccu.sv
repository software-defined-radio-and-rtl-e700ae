// tb_montium_ccu: random crossbar entries, lane valids, output requests and
// configuration writes; checks the stall (en), lane consumption (in_ready),
// output handshake, region strobes, start pulse and address fields.
module tb_montium_ccu;
  import montium_pkg::*;
  logic cfg_we; logic [15:0] cfg_addr, cfg_wdata;
  logic [NBUS-1:0] in_valid, in_ready;
  logic out_valid, out_ready, running, en, start;
  word_t out_data; xbar_entry_t xbar; instr_t instr; word_t [NBUS-1:0] bus;
  logic [7:0] dec_we; logic [5:0] cfg_entry; logic [3:0] cfg_word, cfg_mem;
  logic [8:0] cfg_maddr;
  int checks = 0, failures = 0;

  montium_ccu dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [NBUS-1:0] used;
      logic st, e_en;
      for (int b = 0; b < NBUS; b++) begin
        xbar.src[b] = ($urandom % 3 == 0) ? SRC_CCU : 5'($urandom % 21);
        bus[b] = word_t'($urandom);
        used[b] = (xbar.src[b] == SRC_CCU);
      end
      in_valid = NBUS'($urandom) | NBUS'($urandom);
      instr = instr_t'({$urandom, $urandom});
      out_ready = 1'($urandom); running = ($urandom % 4) != 0;
      cfg_we = 1'($urandom); cfg_addr = 16'($urandom); cfg_wdata = 16'($urandom);
      #1;
      st = running && ((used & ~in_valid) != 0 || (instr.out_en && !out_ready));
      e_en = !st;
      checks++;
      if (en !== e_en) begin failures++; $display("en %b exp %b", en, e_en); end
      checks++;
      if (in_ready !== ((running && e_en) ? used : '0)) begin failures++; $display("in_ready"); end
      checks++;
      if (out_valid !== (running && instr.out_en && (used & ~in_valid) == 0) ||
          out_data !== ((instr.out_bus < 4'(NBUS)) ? bus[instr.out_bus] : '0)) begin failures++; $display("out"); end
      checks++;
      if (dec_we !== (cfg_we ? 8'(1 << cfg_addr[15:13]) : 8'h0) ||
          start !== (cfg_we && cfg_addr[15:13] == 3'd7 && cfg_wdata[0]) ||
          cfg_entry !== cfg_addr[9:4] || cfg_word !== cfg_addr[3:0] ||
          cfg_mem !== cfg_addr[12:9] || cfg_maddr !== cfg_addr[8:0]) begin
        failures++; $display("cfg decode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
