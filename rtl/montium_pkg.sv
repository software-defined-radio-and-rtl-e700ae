// montium_pkg: widths, encodings and configuration records shared by the
// blocks of the Montium coarse-grained reconfigurable tile.
//
// The tile is a 16-bit datapath with five processing parts (PP). Each PP has
// one ALU with four inputs (A..D), each fed by a private four-entry input
// register file, and two 512 x 16 local memories with an address generation
// unit (AGU). Ten global buses connect memories, ALU outputs and the
// communication and configuration unit (CCU). Those numbers follow the
// document. Operation codes, bus source codes, decoder entry layouts and the
// configuration address map are this design's own choices, since the
// document gives only the structure.
package montium_pkg;

  localparam int W         = 16;   // data path width
  localparam int NPP       = 5;    // processing parts / ALUs
  localparam int NMEM      = 10;   // local memories M01..M10
  localparam int NBUS      = 10;   // global buses (1)..(10)
  localparam int MEM_DEPTH = 512;  // words per local memory
  localparam int MEM_AW    = 9;
  localparam int RF_DEPTH  = 4;    // operands per input register file
  localparam int NDEC      = 32;   // entries per decoder
  localparam int DEC_IW    = 5;
  localparam int NPROG     = 64;   // sequencer program length
  localparam int PROG_AW   = 6;

  typedef logic signed [W-1:0] word_t;

  // ---------------------------------------------------------------- ALU
  // Level-1 function unit operations, applied as op(x, y).
  typedef enum logic [2:0] {
    FU_PASSX = 3'd0, FU_PASSY = 3'd1, FU_ADD = 3'd2, FU_SUB = 3'd3,
    FU_AND   = 3'd4, FU_OR    = 3'd5, FU_XOR = 3'd6, FU_NEGX = 3'd7
  } fu_op_e;

  // Level-2 multiplier mode.
  typedef enum logic [1:0] {
    MUL_OFF = 2'd0,  // pass function unit 3 to the adder
    MUL_INT = 2'd1,  // signed integer product, low 16 bits
    MUL_FRAC = 2'd2  // signed Q1.15 fixed-point product, rounded, saturated
  } mul_mode_e;

  // Second operand of the level-2 adder.
  typedef enum logic [0:0] {ADD_ZERO = 1'b0, ADD_EAST = 1'b1} add_src_e;

  // Source of ALU output OUT2.
  typedef enum logic [1:0] {
    O2_ADDER = 2'd0, O2_FU3 = 2'd1, O2_FU4 = 2'd2, O2_FU1 = 2'd3
  } out2_sel_e;

  typedef struct packed {
    fu_op_e    fu1, fu2, fu3, fu4;
    mul_mode_e mul;
    add_src_e  add_src;
    logic      sub;      // adder computes product - addend
    logic      sat;      // saturate the adder result to 16 bits
    out2_sel_e out2;
  } alu_cfg_t;           // 19 bits

  // ---------------------------------------------------------- global buses
  // Bus source codes, 5 bits.
  localparam logic [4:0] SRC_ZERO = 5'd0;
  localparam logic [4:0] SRC_MEM0 = 5'd1;   // 1..10: memory M01..M10 read data
  localparam logic [4:0] SRC_ALU0 = 5'd11;  // 11..20: ALU1.out1, ALU1.out2, ALU2.out1, ...
  localparam logic [4:0] SRC_CCU  = 5'd21;  // the CCU input lane of this bus

  // ------------------------------------------------------------ decoders
  typedef struct packed {
    logic [NBUS-1:0][4:0] src;
  } xbar_entry_t;                 // 50 bits

  typedef struct packed {
    logic       we;
    logic [1:0] wsel;  // register written
    logic [1:0] rsel;  // register read towards the ALU
    logic [3:0] bus;   // global bus written from
  } rf_ctl_t;          // 9 bits

  typedef struct packed {
    rf_ctl_t [NPP-1:0][3:0] rf;   // [pp][input A..D]
  } reg_entry_t;                  // 180 bits

  typedef struct packed {
    logic       we;     // write the bus value at the AGU address
    logic [3:0] bus;
    logic       step;   // advance the AGU after this cycle
    logic       rst;    // return the AGU to its base address
    logic       lut;    // address = base + ALU output abus (lookup table)
    logic [3:0] abus;   // 0..9: ALU1.out1, ALU1.out2, ALU2.out1, ...
  } mem_ctl_t;          // 12 bits

  typedef struct packed {
    mem_ctl_t [NMEM-1:0] m;
  } mem_entry_t;                  // 120 bits

  typedef struct packed {
    alu_cfg_t [NPP-1:0] a;
  } alu_entry_t;                  // 95 bits

  // ------------------------------------------------------------ sequencer
  typedef enum logic [2:0] {
    SQ_NEXT = 3'd0,  // go to pc+1
    SQ_JUMP = 3'd1,  // go to target
    SQ_SETLC = 3'd2, // load the loop counter with count, go to pc+1
    SQ_LOOP = 3'd3,  // if loop counter != 0: decrement, go to target
    SQ_HALT = 3'd4   // stop, raise done
  } sq_op_e;

  typedef struct packed {
    logic [DEC_IW-1:0] mem_i, xbar_i, reg_i, alu_i;
    logic              out_en;   // hand a bus value to the CCU output
    logic [3:0]        out_bus;
    sq_op_e            op;
    logic [PROG_AW-1:0] target;
    logic [9:0]        count;
  } instr_t;                      // 44 bits

  // ------------------------------------------------ configuration address map
  // cfg_addr[15:13] selects the region.
  //   0 memory decoder, 1 crossbar decoder, 2 register decoder, 3 ALU decoder,
  //   4 sequencer program  : [9:4] entry, [3:0] 16-bit word, word 0 least significant
  //   5 AGU registers      : [7:4] memory, [1:0] 0 base, 1 stride, 2 length
  //   6 local memory data  : [12:9] memory, [8:0] address
  //   7 control            : write bit 0 = start the sequencer at pc 0
  localparam logic [2:0] R_MEMDEC = 3'd0, R_XBAR = 3'd1, R_REGDEC = 3'd2,
                         R_ALUDEC = 3'd3, R_PROG = 3'd4, R_AGU = 3'd5,
                         R_MEMDAT = 3'd6, R_CTRL = 3'd7;

  function automatic logic [15:0] make_cfg_addr(logic [2:0] region, int unsigned entry,
                                           int unsigned wrd);
    return {region, 3'd0, entry[5:0], wrd[3:0]};
  endfunction

endpackage
