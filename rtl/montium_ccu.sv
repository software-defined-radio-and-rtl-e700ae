// montium_ccu: Communication and Configuration Unit of the Montium tile.
//
// Configuration: one 16-bit word (two bytes, as in the document) is accepted
// per cycle on cfg_we/cfg_addr/cfg_wdata and steered to the decoder tables,
// sequencer program, AGU registers, local memories or the control register
// (address map in montium_pkg). A write of bit 0 to the control register
// starts the sequencer.
//
// Streaming: each global bus has one input lane from outside the tile. When
// the current crossbar entry places a lane on its bus, the lane must be
// valid; otherwise the CCU stalls the whole tile for that cycle (nothing is
// written, the sequencer holds). The same happens when the instruction hands
// a bus value to the output and out_ready is low. A lane is consumed
// (in_ready high) only in a cycle that is not stalled. This is how the tile
// runs in 'streaming' mode and how the CCU stops a stream, as the document
// describes; the valid/ready handshake itself is this design's choice.
module montium_ccu
  import montium_pkg::*;
(
  // external side
  input  logic               cfg_we,
  input  logic [15:0]        cfg_addr,
  input  logic [15:0]        cfg_wdata,
  input  logic [NBUS-1:0]    in_valid,
  output logic [NBUS-1:0]    in_ready,
  output logic               out_valid,
  output word_t              out_data,
  input  logic               out_ready,
  // tile side
  input  logic               running,
  input  xbar_entry_t        xbar,
  input  instr_t             instr,
  input  word_t [NBUS-1:0]   bus,
  output logic               en,
  output logic               start,
  output logic [7:0]         dec_we,     // one strobe per region
  output logic [5:0]         cfg_entry,
  output logic [3:0]         cfg_word,
  output logic [3:0]         cfg_mem,
  output logic [8:0]         cfg_maddr
);

  logic [NBUS-1:0] used;
  logic            in_stall, out_stall;

  always_comb begin
    for (int b = 0; b < NBUS; b++) used[b] = (xbar.src[b] == SRC_CCU);
    in_stall  = running && |(used & ~in_valid);
    out_stall = running && instr.out_en && !out_ready;
    en        = !(in_stall || out_stall);
    in_ready  = (running && en) ? used : '0;
    out_valid = running && instr.out_en && !in_stall;
    out_data  = (instr.out_bus < 4'(NBUS)) ? bus[instr.out_bus] : '0;  // codes 10..15 read zero

    dec_we    = cfg_we ? (8'd1 << cfg_addr[15:13]) : 8'd0;
    start     = dec_we[R_CTRL] && cfg_wdata[0];
    cfg_entry = cfg_addr[9:4];
    cfg_word  = cfg_addr[3:0];
    cfg_mem   = cfg_addr[12:9];
    cfg_maddr = cfg_addr[8:0];
  end

endmodule
