// rake_receiver: flexible W-CDMA RAKE receiver (de-scrambling, de-spreading,
// maximal ratio combining and QPSK de-mapping) for up to NF fingers.
//
// Operation per output symbol, following the schedule the document gives for
// its Montium mapping:
//  * De-spread phase: for every chip, one finger is handled per clock cycle,
//    so two fingers take two cycles and all nf fingers take nf cycles. The
//    finger's chip d is de-scrambled with the complex scrambling chip c
//    (d * conj(c), c in {+-1 +- j}), multiplied by the spreading code bit
//    (+-1) and added to that finger's accumulator. A symbol is SF chips.
//  * Combining phase: nf cycles, one finger per cycle, add conj(w_f) * acc_f
//    (w_f the complex weight from the channel estimator), then one cycle to
//    de-map the sum to two bits (1 = negative component) and output it.
// With 4 fingers a symbol therefore takes 4*SF + 5 cycles, as in the
// document. Switching to 2 fingers (nf = 2) stops fingers 3 and 4 being
// streamed and skips their de-spreading and combining: 2*SF + 3 cycles.
//
// Configuration: the spreading code (up to SF_MAX = 512 chips, one bit each)
// lives in a local memory written one chip per cycle; a further write sets
// the constants SF and nf, so a code change costs SF + 1 cycles as in the
// document. Configuration writes are taken only between symbols (idle, i.e.
// before the first chip of a symbol has been accepted).
//
// Streams (valid/ready): one chip for all fingers plus the scrambling chip;
// chip_ready pulses in the cycle the last finger of that chip is handled.
// The weights are taken in the first combining cycle (coef_ready). While a
// needed stream is not valid the receiver waits; the stall counter shows it.
// Word widths, the accumulator width and the exact handshake are this
// design's choices; the document does not give them.
module rake_receiver
  import sdr_pkg::*;
#(
  parameter int NF     = 4,
  parameter int SF_MAX = 512,
  localparam int AW    = $clog2(SF_MAX),
  localparam int ACCW  = 16 + AW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             code_we,
  input  logic [AW-1:0]    code_addr,
  input  logic             code_bit,    // 1 = -1
  input  logic             const_we,
  input  logic [AW:0]      sf_val,      // 4 .. SF_MAX
  input  logic [2:0]       nf_val,      // 1 .. NF
  // chip stream
  input  logic             chip_valid,
  output logic             chip_ready,
  input  cplx16_t [NF-1:0] chip,
  input  logic             sc_i,        // scrambling chip, 1 = -1
  input  logic             sc_q,
  // MRC weights, Q1.15
  input  logic             coef_valid,
  output logic             coef_ready,
  input  cplx16_t [NF-1:0] coef,
  // output
  output logic             sym_valid,
  output logic [1:0]       sym_bits,    // {Q, I}, 1 = negative
  output logic signed [31:0] sym_re,
  output logic signed [31:0] sym_im,
  output logic             stall,
  output logic             busy
);

  typedef enum logic [1:0] {S_DESP, S_COMB, S_DEMAP} state_e;
  state_e state;

  logic              code [SF_MAX];
  logic [AW:0]       sf;
  logic [2:0]        nf;
  logic [AW-1:0]     chip_k;
  logic [2:0]        fin;
  logic signed [ACCW-1:0] acc_re [NF];
  logic signed [ACCW-1:0] acc_im [NF];
  cplx16_t [NF-1:0]  w;
  logic signed [ACCW+17:0] sum_re, sum_im;

  // De-scramble and de-spread one chip of finger fin.
  logic signed [16:0] dre, dim, dsre, dsim;
  always_comb begin
    cplx16_t d;
    d = chip[fin[$clog2(NF)-1:0]];
    // d * conj(c): re = dI*cI + dQ*cQ, im = dQ*cI - dI*cQ
    dre = (sc_i ? -17'(d.re) : 17'(d.re)) + (sc_q ? -17'(d.im) : 17'(d.im));
    dim = (sc_i ? -17'(d.im) : 17'(d.im)) - (sc_q ? -17'(d.re) : 17'(d.re));
    dsre = code[chip_k] ? -dre : dre;
    dsim = code[chip_k] ? -dim : dim;
  end

  // conj(w_f) * acc_f for the combining step.
  logic signed [ACCW+16:0] pre, pim;
  always_comb begin
    cplx16_t wf;
    logic signed [ACCW-1:0] ar, ai;
    wf = (fin == 3'd0) ? coef[0] : w[fin[$clog2(NF)-1:0]];
    ar = acc_re[fin[$clog2(NF)-1:0]];
    ai = acc_im[fin[$clog2(NF)-1:0]];
    pre = (ACCW+17)'(ar * wf.re) + (ACCW+17)'(ai * wf.im);
    pim = (ACCW+17)'(ai * wf.re) - (ACCW+17)'(ar * wf.im);
  end

  logic idle;
  assign idle = (state == S_DESP) && (chip_k == '0) && (fin == '0);
  assign busy = !idle;

  always_comb begin
    chip_ready = (state == S_DESP) && chip_valid && (fin == nf - 3'd1);
    coef_ready = (state == S_COMB) && (fin == '0) && coef_valid;
    stall      = ((state == S_DESP) && !chip_valid && !idle) ||
                 ((state == S_COMB) && (fin == '0) && !coef_valid);
  end

  always_ff @(posedge clk) begin
    if (code_we && idle) code[code_addr] <= code_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_DESP; sf <= (AW+1)'(SF_MAX); nf <= 3'(NF);
      chip_k <= '0; fin <= '0; sym_valid <= 1'b0; sym_bits <= '0;
      sum_re <= '0; sum_im <= '0; sym_re <= '0; sym_im <= '0; w <= '0;
      for (int f = 0; f < NF; f++) begin acc_re[f] <= '0; acc_im[f] <= '0; end
    end else begin
      sym_valid <= 1'b0;
      if (const_we && idle) begin
        sf <= sf_val;
        nf <= nf_val;
      end
      unique case (state)
        S_DESP: if (chip_valid && !(const_we && idle)) begin
          acc_re[fin[$clog2(NF)-1:0]] <=
            ((chip_k == '0) ? '0 : acc_re[fin[$clog2(NF)-1:0]]) + ACCW'(dsre);
          acc_im[fin[$clog2(NF)-1:0]] <=
            ((chip_k == '0) ? '0 : acc_im[fin[$clog2(NF)-1:0]]) + ACCW'(dsim);
          if (fin == nf - 3'd1) begin
            fin <= '0;
            if (chip_k == AW'(sf - 1'b1)) begin
              chip_k <= '0;
              state  <= S_COMB;
            end else begin
              chip_k <= chip_k + 1'b1;
            end
          end else begin
            fin <= fin + 1'b1;
          end
        end
        S_COMB: if (fin != '0 || coef_valid) begin
          if (fin == '0) w <= coef;
          sum_re <= ((fin == '0) ? '0 : sum_re) + (ACCW+18)'(pre);
          sum_im <= ((fin == '0) ? '0 : sum_im) + (ACCW+18)'(pim);
          if (fin == nf - 3'd1) begin
            fin   <= '0;
            state <= S_DEMAP;
          end else begin
            fin <= fin + 1'b1;
          end
        end
        default: begin  // S_DEMAP
          sym_re    <= 32'(sum_re >>> 15);
          sym_im    <= 32'(sum_im >>> 15);
          sym_bits  <= {sum_im[ACCW+17], sum_re[ACCW+17]};
          sym_valid <= 1'b1;
          state     <= S_DESP;
        end
      endcase
    end
  end

endmodule
