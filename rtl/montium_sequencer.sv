// montium_sequencer: the simple sequencer of the Montium tile.
//
// It steps through a program of NPROG instructions (stored in a configurable
// table, loaded 16 bits per cycle through the configuration port). Each
// instruction names one entry of each of the four decoders (memory, crossbar,
// register, ALU) that configure the processing part array for that cycle, an
// optional hand-off of a bus value to the CCU output, and a control operation:
// next, jump, set loop counter, loop, halt. A start pulse sends it to pc 0;
// halt stops it and raises done. While en is low (a CCU stall) nothing
// advances. One instruction is issued per clock cycle.
// The document says only that a relatively simple sequencer selects the
// instructions stored in the decoders; the operation set is this design's.
module montium_sequencer
  import montium_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               start,
  input  logic               cfg_we,
  input  logic [PROG_AW-1:0] cfg_entry,
  input  logic [3:0]         cfg_word,
  input  logic [15:0]        cfg_wdata,
  output instr_t             instr,
  output logic               running,
  output logic               done,
  output logic [PROG_AW-1:0] pc
);

  logic [9:0] lc;

  montium_decoder #(.ENTRIES(NPROG), .BITS($bits(instr_t))) u_prog (
    .clk, .rst_n, .cfg_we, .cfg_entry, .cfg_word, .cfg_wdata,
    .sel(pc), .entry_o(instr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; lc <= '0; running <= 1'b0; done <= 1'b0;
    end else if (start) begin
      pc <= '0; lc <= '0; running <= 1'b1; done <= 1'b0;
    end else if (running && en) begin
      unique case (instr.op)
        SQ_JUMP:  pc <= instr.target;
        SQ_SETLC: begin lc <= instr.count; pc <= pc + 1'b1; end
        SQ_LOOP:  if (lc != '0) begin lc <= lc - 1'b1; pc <= instr.target; end
                  else pc <= pc + 1'b1;
        SQ_HALT:  begin running <= 1'b0; done <= 1'b1; end
        default:  pc <= pc + 1'b1;
      endcase
    end
  end

endmodule
