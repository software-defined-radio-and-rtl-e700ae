// montium_alu: the combinational 16-bit ALU of one Montium processing part.
//
// Structure (after the document's ALU figure): four 16-bit inputs A..D.
// Level 1 holds four function units: FU1 works on (A, B), FU2 on (C, D),
// FU3 on (FU1, FU2) and FU4 on (FU2, FU1). Level 2 holds a multiplier fed by
// FU3 and FU4, and an adder that adds the product to in_east (the West output
// of the right-hand neighbour) or to zero. The adder result leaves on
// out_west (to the left neighbour), on out1 and, selectable, on out2.
// The ALU has no registers and no pipeline stage: every output settles in the
// same cycle as its inputs, and the east-west path is unregistered, as the
// document states. Operands are signed integers or signed Q1.15 fractions.
//
// The set of level-1 operations, the multiplier modes, the saturation option
// and the out2 selection are this design's choice; the document only names
// the units. The figure draws out2 from the adder like out1; here out2 can
// also carry a level-1 result so that such results can leave the ALU.
module montium_alu
  import montium_pkg::*;
(
  input  alu_cfg_t cfg,
  input  word_t    in_a, in_b, in_c, in_d,
  input  word_t    in_east,
  output word_t    out_west,
  output word_t    out1,
  output word_t    out2
);

  function automatic word_t fu(fu_op_e op, word_t x, word_t y);
    unique case (op)
      FU_PASSX: return x;
      FU_PASSY: return y;
      FU_ADD:   return x + y;
      FU_SUB:   return x - y;
      FU_AND:   return x & y;
      FU_OR:    return x | y;
      FU_XOR:   return x ^ y;
      FU_NEGX:  return -x;
      default:  return x;
    endcase
  endfunction

  word_t f1, f2, f3, f4, prod, addend, sum;
  logic signed [31:0] p32;
  logic signed [17:0] s18;
  logic signed [17:0] frac;

  always_comb begin
    f1 = fu(cfg.fu1, in_a, in_b);
    f2 = fu(cfg.fu2, in_c, in_d);
    f3 = fu(cfg.fu3, f1, f2);
    f4 = fu(cfg.fu4, f2, f1);

    p32  = f3 * f4;
    // Q1.15 product with round-half-up; only -1 * -1 exceeds the range.
    frac = 18'((p32 + 32'sd16384) >>> 15);
    unique case (cfg.mul)
      MUL_INT:  prod = p32[15:0];
      MUL_FRAC: prod = (frac > 18'sd32767) ? 16'sh7fff : frac[15:0];
      default:  prod = f3;
    endcase

    addend = (cfg.add_src == ADD_EAST) ? in_east : '0;
    s18 = cfg.sub ? (18'(prod) - 18'(addend)) : (18'(prod) + 18'(addend));
    if (cfg.sat && s18 > 18'sd32767)       sum = 16'sh7fff;
    else if (cfg.sat && s18 < -18'sd32768) sum = 16'sh8000;
    else                                   sum = s18[15:0];

    out_west = sum;
    out1     = sum;
    unique case (cfg.out2)
      O2_FU3:  out2 = f3;
      O2_FU4:  out2 = f4;
      O2_FU1:  out2 = f1;
      default: out2 = sum;
    endcase
  end

endmodule
