// montium_decoder: one configurable instruction table of the Montium tile.
//
// The tile has four of these (memory, crossbar, register and ALU decoder) and
// the sequencer program uses the same structure. Each holds ENTRIES
// instructions of BITS bits, written 16 bits at a time through the
// configuration port (word 0 is the least significant). The sequencer picks an
// entry with sel each cycle, and the entry appears combinationally on
// entry_o. This two-level scheme (a small sequencer selecting stored
// instructions) follows the document; the table sizes are this design's
// choice. Contents are cleared at reset.
module montium_decoder #(
  parameter int ENTRIES = 32,
  parameter int BITS    = 50,
  localparam int WORDS  = (BITS + 15) / 16,
  localparam int IW     = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [IW-1:0]   cfg_entry,
  input  logic [3:0]      cfg_word,
  input  logic [15:0]     cfg_wdata,
  input  logic [IW-1:0]   sel,
  output logic [BITS-1:0] entry_o
);

  logic [WORDS*16-1:0] tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (cfg_we && int'(cfg_word) < WORDS) begin
      tab[cfg_entry][cfg_word*16 +: 16] <= cfg_wdata;
    end
  end

  assign entry_o = tab[sel][BITS-1:0];

endmodule
