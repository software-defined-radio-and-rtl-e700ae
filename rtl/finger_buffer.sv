// finger_buffer: per-finger path-delay buffer in front of the RAKE receiver.
//
// The received chip stream is written into a circular local memory of DEPTH
// complex words (512, the depth of a Montium local memory). Finger f reads
// the sample delay[f] chips older than the newest one (delay 0 = the chip
// arriving now), so the NF streams leave time-aligned with their path and all
// fingers can use the same scrambling chip. Changing the path-delay profile
// only means writing new delays (delay_we), which corresponds to the
// document's reconfiguration of the buffering strategy of the local memories
// when a path delay changes.
// Handshake: a chip moves through (written and the NF taps presented) in a
// cycle with in_valid and out_ready; in_ready = out_ready, out_valid =
// in_valid. Delays up to DEPTH-1. The pointer scheme is this design's choice.
module finger_buffer
  import sdr_pkg::*;
#(
  parameter int NF    = 4,
  parameter int DEPTH = 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             delay_we,
  input  logic [1:0]       delay_f,
  input  logic [AW-1:0]    delay_val,
  input  logic             in_valid,
  output logic             in_ready,
  input  cplx16_t          in_s,
  output logic             out_valid,
  input  logic             out_ready,
  output cplx16_t [NF-1:0] taps
);

  cplx16_t       buf_q [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW-1:0] dly [NF];

  assign in_ready  = out_ready;
  assign out_valid = in_valid;

  always_comb begin
    for (int f = 0; f < NF; f++)
      taps[f] = (dly[f] == '0) ? in_s : buf_q[AW'(wptr - dly[f])];
  end

  always_ff @(posedge clk) begin
    if (in_valid && out_ready) buf_q[wptr] <= in_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int f = 0; f < NF; f++) dly[f] <= '0;
    end else begin
      if (delay_we && int'(delay_f) < NF) dly[delay_f] <= delay_val;
      if (in_valid && out_ready) wptr <= wptr + 1'b1;
    end
  end

endmodule
