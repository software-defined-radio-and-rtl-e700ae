// montium_mem: one Montium local memory with its address generation unit.
//
// A DEPTH x W SRAM (512 x 16 = 8 Kbit in the document) read asynchronously at
// the address the AGU holds. The AGU is reconfigurable with three registers:
// base, stride and length. Its address is base + offset, where offset starts
// at 0 and on each step advances by stride modulo length, so a memory can
// serve as a circular buffer (delay line) or walk a table. The same memory can
// act as a lookup table for functions an ALU cannot compute: with lut high
// the address is base + the low AW bits of lut_idx (in the tile, an ALU
// output), so a table at base is indexed by data in the same cycle.
// The document gives the memory size and says an AGU accompanies it; the
// base/stride/length scheme is this design's choice.
//
// Ports: cfg_* writes one AGU register (sel 0 base, 1 stride, 2 length) and
// resets the offset; dwe/daddr/dwdata write the array directly (used for
// loading through the configuration port). In operation (en high), we writes
// wdata at the AGU address, step advances the AGU, rst returns it to base,
// lut selects the data-indexed address.
module montium_mem #(
  parameter int DEPTH = 512,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  // AGU configuration
  input  logic          cfg_we,
  input  logic [1:0]    cfg_sel,
  input  logic [AW:0]   cfg_val,
  // direct array write
  input  logic          dwe,
  input  logic [AW-1:0] daddr,
  input  logic [W-1:0]  dwdata,
  // operation
  input  logic          we,
  input  logic [W-1:0]  wdata,
  input  logic          step,
  input  logic          rst,
  input  logic          lut,      // address from data: base + lut_idx
  input  logic [W-1:0]  lut_idx,
  output logic [W-1:0]  rdata,
  output logic [AW-1:0] addr
);

  logic [W-1:0]  ram [DEPTH];
  logic [AW-1:0] base, stride, offset;
  logic [AW:0]   len;          // 1..DEPTH
  logic [AW:0]   nxt;

  assign addr  = lut ? AW'(base + lut_idx[AW-1:0]) : AW'(base + offset);
  assign rdata = ram[addr];

  always_comb begin
    nxt = {1'b0, offset} + {1'b0, stride};
    if (nxt >= len) nxt = nxt - len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base   <= '0;
      stride <= AW'(1);
      len    <= (AW+1)'(DEPTH);
      offset <= '0;
    end else if (cfg_we) begin
      unique case (cfg_sel)
        2'd0:    base   <= cfg_val[AW-1:0];
        2'd1:    stride <= cfg_val[AW-1:0];
        default: len    <= (cfg_val == '0) ? (AW+1)'(DEPTH) : cfg_val;
      endcase
      offset <= '0;
    end else if (en) begin
      if (rst)       offset <= '0;
      else if (step) offset <= nxt[AW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (dwe)            ram[daddr] <= dwdata;
    else if (en && we)  ram[addr]  <= wdata;
  end

endmodule
