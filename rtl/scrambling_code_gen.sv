// scrambling_code_gen: complex downlink scrambling code generator.
//
// The document places this generator in fine-grained hardware, built from
// shift registers and XOR gates, and feeds its complex output to the RAKE
// receiver; it also gives the code length of 38400 chips. The sequence
// itself follows the UMTS downlink Gold code (general knowledge of the
// standard, not the document): two 18-stage LFSRs,
//   x: x(i+18) = x(i+7) ^ x(i),              x(0)=1, x(1..17)=0
//   y: y(i+18) = y(i+10) ^ y(i+7) ^ y(i+5) ^ y(i),   y(0..17)=1
// with code n using x advanced by n steps. The I chip is x(0)^y(0); the Q
// chip is the same sequence 131072 chips later, formed with the tap masks
// x{4,6,15} and y{5,6,8,9,10,11,12,13,14,15}. A chip bit of 1 means -1.
//
// Interface: start (with code_n) resets both registers and spends n cycles
// advancing x (busy high), then chips stream out: valid is high and each cycle
// with ready high consumes one chip. After CODE_LEN chips the generator
// returns to the first chip of the same code.
module scrambling_code_gen #(
  parameter int CODE_LEN = 38400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [12:0] code_n,
  input  logic        ready,
  output logic        valid,
  output logic        busy,
  output logic        c_i,
  output logic        c_q
);

  logic [17:0] x, y, x0;
  logic [12:0] seek;
  logic [$clog2(CODE_LEN)-1:0] idx;

  function automatic logic [17:0] step_x(logic [17:0] s);
    return {s[7] ^ s[0], s[17:1]};
  endfunction
  function automatic logic [17:0] step_y(logic [17:0] s);
    return {s[10] ^ s[7] ^ s[5] ^ s[0], s[17:1]};
  endfunction

  assign c_i = x[0] ^ y[0];
  assign c_q = (x[4] ^ x[6] ^ x[15]) ^
               (y[5] ^ y[6] ^ y[8] ^ y[9] ^ y[10] ^ y[11] ^ y[12] ^ y[13] ^
                y[14] ^ y[15]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 18'd1; y <= '1; x0 <= 18'd1; seek <= '0; idx <= '0;
      busy <= 1'b0; valid <= 1'b0;
    end else if (start) begin
      x <= 18'd1; y <= '1; seek <= code_n; idx <= '0;
      busy <= 1'b1; valid <= 1'b0;
    end else if (busy) begin
      if (seek != '0) begin
        x    <= step_x(x);
        seek <= seek - 1'b1;
      end else begin
        x0    <= x;
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end else if (valid && ready) begin
      if (idx == $bits(idx)'(CODE_LEN - 1)) begin
        idx <= '0; x <= x0; y <= '1;
      end else begin
        idx <= idx + 1'b1; x <= step_x(x); y <= step_y(y);
      end
    end
  end

endmodule
