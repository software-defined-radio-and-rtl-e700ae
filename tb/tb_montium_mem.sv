// tb_montium_mem: local memory with AGU. Loads the array through the direct
// port, then checks a base/stride/length address sequence (circular buffer)
// with random stalls, writes through the AGU, the AGU reset and the wrap,
// then lookup-table use: random data indices from base 200 (wrapping at the
// end of the array) and a write at a data-indexed address.
module tb_montium_mem;
  logic clk = 0, rst_n = 0, en = 0;
  logic cfg_we = 0; logic [1:0] cfg_sel = 0; logic [9:0] cfg_val = 0;
  logic dwe = 0; logic [8:0] daddr = 0; logic [15:0] dwdata = 0;
  logic we = 0; logic [15:0] wdata = 0; logic step = 0, rst = 0;
  logic lut = 0; logic [15:0] lut_idx = 0;
  logic [15:0] rdata; logic [8:0] addr;
  logic [15:0] model [512];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  montium_mem #(.DEPTH(512), .W(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setagu(int base, int stride, int len);
    @(negedge clk); cfg_we = 1; cfg_sel = 0; cfg_val = 10'(base);
    @(negedge clk); cfg_sel = 1; cfg_val = 10'(stride);
    @(negedge clk); cfg_sel = 2; cfg_val = 10'(len);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int off;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); dwe = 1; daddr = 9'(i); dwdata = 16'(i * 37 + 5);
      model[i] = 16'(i * 37 + 5);
    end
    @(negedge clk); dwe = 0;
    // circular walk: base 100, stride 3, length 10, random stalls (en low)
    off = 0;
    en = 0; step = 1;
    setagu(100, 3, 10);
    for (int n = 0; n < 40; n++) begin
      en = ($urandom % 4) != 0;
      #1; checks++;
      if (addr !== 9'(100 + off) || rdata !== model[100 + off]) begin
        failures++; $display("n=%0d addr %0d exp %0d", n, addr, 100 + off);
      end
      @(posedge clk);
      if (en) off = (off + 3) % 10;
      @(negedge clk);
    end
    // AGU writes: base 400 stride 1 length 8, write 8 values then read back
    en = 0;
    setagu(400, 1, 8);
    en = 1; step = 1; we = 1;
    for (int n = 0; n < 8; n++) begin
      wdata = 16'(16'hA000 + n);
      @(posedge clk); model[400 + n] = 16'(16'hA000 + n);
      @(negedge clk);
    end
    we = 0; rst = 1; step = 0;
    @(negedge clk); rst = 0; step = 1;
    for (int n = 0; n < 8; n++) begin
      #1; checks++;
      if (rdata !== model[400 + n]) begin
        failures++; $display("agu write %0d got %h", n, rdata);
      end
      @(negedge clk);
    end
    // after 8 steps of a length-8 walk the AGU is back at its base
    #1; checks++;
    if (addr !== 9'd400) begin failures++; $display("wrap addr %0d", addr); end
    // lookup table: address = base + low 9 bits of the index, same cycle
    en = 0; step = 0;
    setagu(200, 1, 0);
    lut = 1;
    for (int n = 0; n < 60; n++) begin
      lut_idx = 16'($urandom);
      #1; checks++;
      if (addr !== 9'(200 + lut_idx[8:0]) || rdata !== model[9'(200 + lut_idx[8:0])]) begin
        failures++; $display("lut idx %0d addr %0d", lut_idx, addr);
      end
      @(negedge clk);
    end
    en = 1; we = 1; lut_idx = 16'd7; wdata = 16'h5A5A;
    @(posedge clk); model[207] = 16'h5A5A;
    @(negedge clk); we = 0; en = 0;
    #1; checks++;
    if (rdata !== 16'h5A5A) begin failures++; $display("lut write got %h", rdata); end
    lut = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
