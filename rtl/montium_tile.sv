// montium_tile: one Montium coarse-grained reconfigurable processing tile.
//
// The tile processor holds five processing parts (PP). PP i has ALU i, the
// four input register files of its inputs A..D, and local memories 2i and
// 2i+1, each with its AGU. Ten global buses, driven by the crossbar, connect
// memory read ports, ALU outputs and the CCU input lanes to register file and
// memory write ports. The West output of ALU i+1 feeds the East input of
// ALU i without a register; ALU5's East input is zero.
//
// Control is two-level, as in the document: the sequencer issues one
// instruction per cycle, and each instruction selects one entry of the
// memory, crossbar, register and ALU decoders. Everything inside a cycle is
// combinational (register file -> ALU -> bus -> register file / memory), so an
// operand written in one cycle is used by the ALU in the next.
//
// The CCU takes configuration words (16 bits per cycle) and the streams. The
// off-tile interface depends on the network-on-chip in the document; here it
// is a plain configuration write port, ten valid/ready input lanes (one per
// global bus) and one valid/ready output.
module montium_tile
  import montium_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [15:0]        cfg_addr,
  input  logic [15:0]        cfg_wdata,
  input  word_t [NBUS-1:0]   in_data,
  input  logic [NBUS-1:0]    in_valid,
  output logic [NBUS-1:0]    in_ready,
  output word_t              out_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               running,
  output logic               done,
  output logic               stall
);

  logic        en, start;
  logic [7:0]  dec_we;
  logic [5:0]  cfg_entry;
  logic [3:0]  cfg_word, cfg_mem;
  logic [8:0]  cfg_maddr;
  instr_t      instr;
  logic [PROG_AW-1:0] pc;

  mem_entry_t  mem_e;
  xbar_entry_t xbar_e;
  reg_entry_t  reg_e;
  alu_entry_t  alu_e;

  word_t [NBUS-1:0]  bus;
  word_t [NMEM-1:0]  mem_rdata;
  word_t [2*NPP-1:0] alu_out;
  word_t [NPP-1:0]   west;
  word_t [NPP-1:0]   east;

  assign stall = running && !en;

  montium_ccu u_ccu (
    .cfg_we, .cfg_addr, .cfg_wdata, .in_valid, .in_ready, .out_valid,
    .out_data, .out_ready, .running, .xbar(xbar_e), .instr, .bus,
    .en, .start, .dec_we, .cfg_entry, .cfg_word, .cfg_mem, .cfg_maddr
  );

  montium_sequencer u_seq (
    .clk, .rst_n, .en, .start, .cfg_we(dec_we[R_PROG]), .cfg_entry,
    .cfg_word, .cfg_wdata, .instr, .running, .done, .pc
  );

  montium_decoder #(.ENTRIES(NDEC), .BITS($bits(mem_entry_t))) u_memdec (
    .clk, .rst_n, .cfg_we(dec_we[R_MEMDEC]), .cfg_entry(cfg_entry[DEC_IW-1:0]),
    .cfg_word, .cfg_wdata, .sel(instr.mem_i), .entry_o(mem_e));
  montium_decoder #(.ENTRIES(NDEC), .BITS($bits(xbar_entry_t))) u_xbardec (
    .clk, .rst_n, .cfg_we(dec_we[R_XBAR]), .cfg_entry(cfg_entry[DEC_IW-1:0]),
    .cfg_word, .cfg_wdata, .sel(instr.xbar_i), .entry_o(xbar_e));
  montium_decoder #(.ENTRIES(NDEC), .BITS($bits(reg_entry_t))) u_regdec (
    .clk, .rst_n, .cfg_we(dec_we[R_REGDEC]), .cfg_entry(cfg_entry[DEC_IW-1:0]),
    .cfg_word, .cfg_wdata, .sel(instr.reg_i), .entry_o(reg_e));
  montium_decoder #(.ENTRIES(NDEC), .BITS($bits(alu_entry_t))) u_aludec (
    .clk, .rst_n, .cfg_we(dec_we[R_ALUDEC]), .cfg_entry(cfg_entry[DEC_IW-1:0]),
    .cfg_word, .cfg_wdata, .sel(instr.alu_i), .entry_o(alu_e));

  montium_crossbar u_xbar (
    .sel(xbar_e), .mem_rdata, .alu_out, .ccu_lane(in_data), .bus
  );

  // Bus read ports for 4-bit bus codes: codes 10..15 read zero.
  word_t [15:0] bus_rd;
  always_comb begin
    bus_rd = '0;
    for (int b = 0; b < NBUS; b++) bus_rd[b] = bus[b];
  end

  // Lookup-table indices come from the ALU outputs (codes 0..9, 10..15 read
  // zero), not from the buses: a bus may carry a memory's own read data,
  // which would close a combinational loop through the address.
  word_t [15:0] alu_rd;
  always_comb begin
    alu_rd = '0;
    for (int k = 0; k < 2*NPP; k++) alu_rd[k] = alu_out[k];
  end

  // Memories: only the sequencer's memory decoder drives them while running.
  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    logic [MEM_AW-1:0] addr_unused;
    montium_mem #(.DEPTH(MEM_DEPTH), .W(W)) u_mem (
      .clk, .rst_n, .en(en && running),
      .cfg_we(dec_we[R_AGU] && cfg_entry[3:0] == 4'(m)),
      .cfg_sel(cfg_word[1:0]), .cfg_val(cfg_wdata[MEM_AW:0]),
      .dwe(dec_we[R_MEMDAT] && cfg_mem == 4'(m)), .daddr(cfg_maddr),
      .dwdata(cfg_wdata),
      .we(mem_e.m[m].we), .wdata(bus_rd[mem_e.m[m].bus]),
      .step(mem_e.m[m].step), .rst(mem_e.m[m].rst),
      .lut(mem_e.m[m].lut), .lut_idx(alu_rd[mem_e.m[m].abus]),
      .rdata(mem_rdata[m]), .addr(addr_unused)
    );
  end

  // Processing parts.
  for (genvar p = 0; p < NPP; p++) begin : g_pp
    word_t [3:0] opnd;
    for (genvar k = 0; k < 4; k++) begin : g_rf
      montium_regfile #(.DEPTH(RF_DEPTH), .W(W)) u_rf (
        .clk, .rst_n, .en(en && running),
        .we(reg_e.rf[p][k].we), .wsel(reg_e.rf[p][k].wsel),
        .wdata(bus_rd[reg_e.rf[p][k].bus]), .rsel(reg_e.rf[p][k].rsel),
        .rdata(opnd[k])
      );
    end
    assign east[p] = (p == NPP-1) ? '0 : west[(p+1) % NPP];
    montium_alu u_alu (
      .cfg(alu_e.a[p]), .in_a(opnd[0]), .in_b(opnd[1]), .in_c(opnd[2]),
      .in_d(opnd[3]), .in_east(east[p]), .out_west(west[p]),
      .out1(alu_out[2*p]), .out2(alu_out[2*p+1])
    );
  end

endmodule
