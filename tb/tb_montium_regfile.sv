// tb_montium_regfile: writes and reads the four-entry input register file,
// checks reset clearing, write enable, the stall input and that a written
// value is visible from the next cycle.
module tb_montium_regfile;
  logic clk = 0, rst_n = 0, en, we;
  logic [1:0] wsel, rsel;
  logic [15:0] wdata, rdata;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  montium_regfile #(.DEPTH(4), .W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 0; wsel = 0; rsel = 0; wdata = 0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      rsel = 2'(i); #1; checks++;
      if (rdata !== 16'h0) begin failures++; $display("reset entry %0d = %h", i, rdata); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); en = ($urandom % 5) != 0;
      wsel = 2'($urandom); wdata = 16'($urandom); rsel = 2'($urandom);
      #1; checks++;
      if (rdata !== model[rsel]) begin failures++; $display("read %0d = %h exp %h", rsel, rdata, model[rsel]); end
      @(posedge clk);
      if (we && en) model[wsel] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
