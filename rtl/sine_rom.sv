// sine_rom: sine/cosine lookup table, used the way a Montium local memory
// serves as a lookup table for functions an ALU cannot compute.
//
// 1024 entries of sin(2*pi*k/1024) * 32767 (Q1.15), read combinationally.
// cos is read from the same table a quarter turn later. The table file
// rtl/sine_rom.hex holds round(32767*sin(2*pi*k/1024)) for k = 0..1023, in
// two's complement hex, one entry per line. Table size and format are this
// design's choice.
module sine_rom (
  input  logic [9:0]         phase,   // 1/1024 turns
  output logic signed [15:0] sin_o,
  output logic signed [15:0] cos_o
);

  logic [15:0] rom [1024];

  initial $readmemh("rtl/sine_rom.hex", rom);

  assign sin_o = rom[phase];
  assign cos_o = rom[phase + 10'd256];

endmodule
