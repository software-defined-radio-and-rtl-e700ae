// montium_regfile: private input register file of one ALU input.
//
// Holds RF_DEPTH (four, as in the document) 16-bit operands. One write port
// stores a global-bus value at the clock edge; one combinational read port
// presents the selected operand to the ALU input. The ALU always reads its
// operand from here (the document states the register file cannot be
// bypassed), so a value written in cycle t is seen by the ALU in cycle t+1.
// Reset clears all entries; that is this design's choice.
module montium_regfile #(
  parameter int DEPTH = 4,
  parameter int W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,     // tile not stalled
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wsel,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] rsel,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] r [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else if (en && we) begin
      r[wsel] <= wdata;
    end
  end

  assign rdata = r[rsel];

endmodule
