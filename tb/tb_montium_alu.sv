// tb_montium_alu: random self-check of the Montium ALU against a reference
// model written separately here: level-1 function units, integer and Q1.15
// multiply, East addend, subtraction, saturation and the OUT2 selection.
module tb_montium_alu;
  import montium_pkg::*;

  alu_cfg_t cfg;
  word_t a, b, c, d, e, west, o1, o2;
  int checks = 0, failures = 0;

  montium_alu dut (.cfg, .in_a(a), .in_b(b), .in_c(c), .in_d(d), .in_east(e),
                   .out_west(west), .out1(o1), .out2(o2));

  function automatic longint ref_fu(int op, longint x, longint y);
    longint r;
    case (op)
      0: r = x; 1: r = y; 2: r = x + y; 3: r = x - y;
      4: r = x & y; 5: r = x | y; 6: r = x ^ y; default: r = -x;
    endcase
    return longint'(16'(r)) <<< 48 >>> 48;   // wrap to signed 16 bits
  endfunction

  function automatic longint wrap16(longint v);
    return longint'($signed(16'(v)));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint f1, f2, f3, f4, p, ad, s, e1, e2;
    for (int n = 0; n < 4000; n++) begin
      cfg = alu_cfg_t'($urandom);
      a = word_t'($urandom); b = word_t'($urandom);
      c = word_t'($urandom); d = word_t'($urandom); e = word_t'($urandom);
      if (n % 4 == 0) begin a = 16'sh8000; c = 16'sh8000; end
      #1;
      f1 = wrap16(ref_fu(int'(cfg.fu1), a, b));
      f2 = wrap16(ref_fu(int'(cfg.fu2), c, d));
      f3 = wrap16(ref_fu(int'(cfg.fu3), f1, f2));
      f4 = wrap16(ref_fu(int'(cfg.fu4), f2, f1));
      case (int'(cfg.mul))
        1: p = wrap16(f3 * f4);
        2: begin p = (f3 * f4 + 16384) >>> 15; if (p > 32767) p = 32767; end
        default: p = f3;
      endcase
      ad = (cfg.add_src == ADD_EAST) ? longint'(e) : 0;
      s = cfg.sub ? p - ad : p + ad;
      if (cfg.sat) begin
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
      end
      e1 = wrap16(s);
      case (int'(cfg.out2))
        1: e2 = f3; 2: e2 = f4; 3: e2 = f1; default: e2 = e1;
      endcase
      checks++;
      if (longint'(o1) != e1 || longint'(west) != e1 || longint'(o2) != e2) begin
        failures++;
        if (failures < 10)
          $display("mismatch n=%0d cfg=%h o1=%0d exp %0d o2=%0d exp %0d", n, cfg,
                   o1, e1, o2, e2);
      end
    end
    // A directed case: complex real part a*c - b*d across two ALUs is in the
    // tile test; here one Q1.15 product 0.5 * 0.5 = 0.25.
    cfg = '0; cfg.mul = MUL_FRAC; a = 16'sh4000; c = 16'sh4000; #1;
    checks++;
    if (o1 !== 16'sh2000) begin failures++; $display("frac 0.5*0.5 = %h", o1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
