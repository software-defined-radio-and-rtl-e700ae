// tb_montium_decoder: fills a 32-entry, 95-bit decoder 16 bits at a time in
// random order and reads every entry back through the select port.
module tb_montium_decoder;
  localparam int E = 32, B = 95;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [4:0] cfg_entry = 0, sel = 0; logic [3:0] cfg_word = 0;
  logic [15:0] cfg_wdata = 0; logic [B-1:0] entry_o;
  logic [111:0] model [E];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  montium_decoder #(.ENTRIES(E), .BITS(B)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < E; i++) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < E; i++) begin
      sel = 5'(i); #1; checks++;
      if (entry_o !== '0) begin failures++; $display("entry %0d not cleared", i); end
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      cfg_we = 1; cfg_entry = 5'($urandom); cfg_word = 4'($urandom % 8);
      cfg_wdata = 16'($urandom);
      @(posedge clk);
      if (cfg_word < 7) model[cfg_entry][cfg_word*16 +: 16] = cfg_wdata;
    end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < E; i++) begin
      sel = 5'(i); #1; checks++;
      if (entry_o !== model[i][B-1:0]) begin failures++; $display("entry %0d mismatch", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
