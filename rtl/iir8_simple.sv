// iir8_simple: one band-pass IIR filter of order ORDER in TDF-II form, with a
// register per partial sum (the "simple form" filter, building block of
// Filter I).
//
// ORDER+1 one_order taps share the registered input x and the output y. Tap 0
// (numerator b0, denominator 0) adds b0*x to partial register s1 and gives y.
// Tap k (1..ORDER) computes s_k = b_k*x - a_k*y + s_{k+1} (s_{ORDER+1} = 0),
// which the partial register of order k stores on the next enable.
//
// Timing: on en the input register takes x_in and every partial register
// takes the value computed from the previous sample, so y for the new sample
// is valid (combinationally from registers) one clock after en and stays
// valid until the next en. Coefficients are parameters (Q5.11); the default
// is the Chebyshev band-pass of bci_pkg. Synchronous active-low reset clears
// the input and all partial registers (reset behaviour is this
// implementation's choice).
module iir8_simple
  import bci_pkg::*;
#(
  parameter int        ORDER = 8,
  parameter iir_coef_t B     = IIR_B_DEFAULT,
  parameter iir_coef_t A     = IIR_A_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,     // new sample
  input  sample_t x_in,
  output sample_t y       // filtered sample, valid the clock after en
);

  sample_t x_q;                 // input register
  sample_t part_q [1:ORDER];    // partial registers s_1..s_ORDER
  sample_t part_d [1:ORDER];    // next partial sums
  sample_t zero;

  assign zero = '0;

  // Tap 0: output.
  one_order u_tap0 (
    .x(x_q), .y(y), .num(B[0]), .den(zero), .par_in(part_q[1]), .par_out(y)
  );

  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    one_order u_tap (
      .x      (x_q),
      .y      (y),
      .num    (B[k]),
      .den    (A[k]),
      .par_in (k < ORDER ? part_q[k < ORDER ? k+1 : ORDER] : zero),
      .par_out(part_d[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      for (int k = 1; k <= ORDER; k++) part_q[k] <= '0;
    end else if (en) begin
      x_q <= x_in;
      for (int k = 1; k <= ORDER; k++) part_q[k] <= part_d[k];
    end
  end

  initial assert (ORDER >= 1 && ORDER <= MAX_ORDER)
    else $error("iir8_simple: ORDER out of range");

endmodule
