// one_order: one tap of a transposed direct-form II (TDF-II) IIR filter.
//
// Computes par_out = par_in + num*x - den*y, the "one order" cell from which
// every filter bank in this design is built: two multipliers and a
// three-operand adder. In a filter of order N, tap k (k = 1..N) receives the
// partial sum of tap k+1 and produces its own; tap 0 is used with den = 0 and
// its par_out is the filter output y.
//
// Arithmetic (this implementation's choice; the design fixes only the Q5.11
// format): both products are exact 32-bit Q10.22 values, their difference is
// shifted right by FRAC bits (truncation towards minus infinity), par_in is
// added and the sum is saturated to 16 bits.
//
// Purely combinational; no clock.
module one_order
  import bci_pkg::*;
#(
  parameter int FRAC = FILT_FRAC
) (
  input  sample_t x,       // filter input sample
  input  sample_t y,       // filter output sample of the same time step
  input  coef_t   num,     // numerator coefficient b_k
  input  coef_t   den,     // denominator coefficient a_k
  input  sample_t par_in,  // partial sum from tap k+1 (0 for the last tap)
  output sample_t par_out  // partial sum of tap k
);

  logic signed [2*DATA_W-1:0] prod_x, prod_y;
  logic signed [2*DATA_W:0]   diff;
  logic signed [63:0]         sum;

  always_comb begin
    prod_x  = num * x;
    prod_y  = den * y;
    diff    = (2*DATA_W+1)'(prod_x) - (2*DATA_W+1)'(prod_y);
    sum     = 64'(diff >>> FRAC) + 64'(par_in);
    par_out = sat16(sum);
  end

endmodule
