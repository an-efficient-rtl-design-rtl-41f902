// csp: common spatial pattern (CSP) projection of the filtered EEG.
//
// Two multiply-accumulate pipelines, one per CSP output, run side by side and
// share one input register, one channel counter and one weight ROM holding a
// 2 x N_CH matrix (parameter W, Q2.14; index = output*MAX_CH + channel). Each
// en presents the sample of the next channel; after the N_CH-th channel both
// sums are ready and out_valid pulses:
//   out_j = sum over c of W[j][c] * x[c]      (j = 1, 2)
//
// Pipeline (clock of en = t):
//   t    input register takes data_in                         (Enable)
//   t+1  product registers take x * W[counter]; counter + 1   (en1)
//   t+2  accumulators take the product, or product + sum      (en2, init2)
//   t+3  output registers take the sums, rescaled to Q5.11    (en3)
//   t+4  out_valid high for one clock (last channel only)
// init2 marks channel 0, so each new set of N_CH samples restarts the sums.
// en may be high every clock. init forces the counter back to channel 0.
// Products are exact (Q7.25); the accumulator adds 6 guard bits; the output
// is the sum shifted right by 14 (truncated) and saturated to 16 bits. The
// widths, the rescaling and the default weights (a placeholder pattern, see
// bci_pkg) are this implementation's choices; the weights come from training.
module csp
  import bci_pkg::*;
#(
  parameter int       N_CH = 59,
  parameter csp_rom_t W    = CSP_W_DEFAULT,
  localparam int      CW   = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int      PW   = 2 * DATA_W,
  localparam int      ACC_W = PW + 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,      // restart at channel 0
  input  logic    en,        // data_in holds the next channel's sample
  input  sample_t data_in,   // filtered sample, Q5.11
  output logic    out_valid,
  output sample_t out1,
  output sample_t out2
);

  sample_t                   d_q;
  logic                      en1_q, en2_q, en3_q, valid_q;
  logic                      init2_q, last2_q;
  logic [CW-1:0]             cnt_q;
  logic signed [PW-1:0]      p1_q, p2_q;
  logic signed [ACC_W-1:0]   acc1_q, acc2_q;
  coef_t                     w1, w2;
  sample_t                   o1_q, o2_q;

  localparam int RA = $clog2(2 * MAX_CH);

  // Weight ROM, addressed by the channel counter.
  assign w1 = W[RA'(cnt_q)];
  assign w2 = W[RA'(MAX_CH) + RA'(cnt_q)];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q     <= '0;
      en1_q   <= 1'b0;
      en2_q   <= 1'b0;
      en3_q   <= 1'b0;
      valid_q <= 1'b0;
      init2_q <= 1'b0;
      last2_q <= 1'b0;
      cnt_q   <= '0;
      p1_q    <= '0;
      p2_q    <= '0;
      acc1_q  <= '0;
      acc2_q  <= '0;
      o1_q    <= '0;
      o2_q    <= '0;
    end else begin
      // Stage 0: input register.
      en1_q <= en;
      if (en) d_q <= data_in;

      // Stage 1: multiply, step the channel counter.
      en2_q <= en1_q;
      if (en1_q) begin
        p1_q    <= d_q * w1;
        p2_q    <= d_q * w2;
        init2_q <= (cnt_q == '0);
        last2_q <= (32'(cnt_q) == N_CH - 1);
        cnt_q   <= (32'(cnt_q) == N_CH - 1) ? '0 : cnt_q + 1'b1;
      end
      if (init) cnt_q <= '0;

      // Stage 2: accumulate.
      en3_q <= en2_q && last2_q;
      if (en2_q) begin
        acc1_q <= init2_q ? ACC_W'(p1_q) : acc1_q + ACC_W'(p1_q);
        acc2_q <= init2_q ? ACC_W'(p2_q) : acc2_q + ACC_W'(p2_q);
      end

      // Stage 3: output registers.
      valid_q <= en3_q;
      if (en3_q) begin
        o1_q <= sat16(64'(acc1_q >>> W_FRAC));
        o2_q <= sat16(64'(acc2_q >>> W_FRAC));
      end
    end
  end

  assign out_valid = valid_q;
  assign out1      = o1_q;
  assign out2      = o2_q;

  initial assert (N_CH >= 1 && N_CH <= MAX_CH) else $error("csp: N_CH out of range");

endmodule
