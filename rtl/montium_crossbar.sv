// montium_crossbar: drives the ten global buses of the Montium tile.
//
// Every bus has its own 5-bit source code (montium_pkg SRC_*): zero, one of
// the ten memory read ports, one of the ten ALU outputs (out1/out2 of ALU1..5)
// or the CCU input lane that belongs to that bus. Purely combinational: a
// value placed on a bus reaches register files and memory write ports in the
// same cycle. The document shows the buses and the crossbar decoder; the
// source encoding is this design's choice. Unused codes drive zero.
module montium_crossbar
  import montium_pkg::*;
(
  input  xbar_entry_t          sel,
  input  word_t [NMEM-1:0]     mem_rdata,
  input  word_t [2*NPP-1:0]    alu_out,   // {.., ALU1.out2, ALU1.out1}
  input  word_t [NBUS-1:0]     ccu_lane,
  output word_t [NBUS-1:0]     bus
);

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      logic [4:0] s;
      s = sel.src[b];
      if (s >= SRC_MEM0 && s < SRC_MEM0 + 5'(NMEM))
        bus[b] = mem_rdata[s - SRC_MEM0];
      else if (s >= SRC_ALU0 && s < SRC_ALU0 + 5'(2*NPP))
        bus[b] = alu_out[s - SRC_ALU0];
      else if (s == SRC_CCU)
        bus[b] = ccu_lane[b];
      else
        bus[b] = '0;
    end
  end

endmodule
