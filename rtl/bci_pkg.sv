// bci_pkg: number formats, sizes and default coefficient tables shared by the
// motor-imagery BCI datapath (band-pass filter bank -> CSP -> variance -> SVM).
//
// Formats. Filter samples and filter coefficients are 16-bit two's complement
// with 5 integer and 11 fraction bits (Q5.11); CSP and SVM weights use 2 integer
// and 14 fraction bits (Q2.14). Those two splits are the design's published
// choices. The variance path is wider (squares Q10.22, variance Q18.22); those
// widths are this implementation's choice.
//
// Default coefficients. The band-pass filter is a Chebyshev type I design of
// order 8 (prototype order 4), 0.5 dB ripple, pass band 8-30 Hz at a 100 Hz
// sampling rate, quantised to Q5.11 (round to nearest). The quantised filter is
// stable (largest pole radius 0.945). Order, band and rate follow the design;
// the ripple is this implementation's choice. CSP and SVM weights come from
// offline training and are not published: the CSP defaults below are a fixed
// placeholder pattern, the SVM default (+1, -1) compares the two variances.
package bci_pkg;

  localparam int DATA_W   = 16;   // sample and coefficient width
  localparam int FILT_FRAC = 11;  // Q5.11 for the filter bank and CSP outputs
  localparam int W_FRAC   = 14;   // Q2.14 for CSP and SVM weights
  localparam int VAR_W    = 40;   // variance register width (Q18.22)
  localparam int MAX_ORDER = 16;  // size of the default coefficient tables

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [DATA_W-1:0] coef_t;
  typedef logic signed [VAR_W-1:0]  var_t;

  localparam int MAX_CH = 64;      // size of the CSP weight table

  typedef coef_t iir_coef_t [MAX_ORDER+1];   // index = order k, 0..ORDER
  typedef coef_t csp_rom_t  [2*MAX_CH];     // index = output*MAX_CH + channel

  // Numerator b0..b8 and denominator a0..a8 (a0 = 1.0 is never used),
  // padded with zeros up to MAX_ORDER.
  localparam iir_coef_t IIR_B_DEFAULT = '{
    0: 16'sd87, 1: 16'sd0, 2: -16'sd350, 3: 16'sd0, 4: 16'sd525,
    5: 16'sd0, 6: -16'sd350, 7: 16'sd0, 8: 16'sd87,
    default: 16'sd0};
  localparam iir_coef_t IIR_A_DEFAULT = '{
    0: 16'sd2048, 1: -16'sd4939, 2: 16'sd6981, 3: -16'sd7699, 4: 16'sd7495,
    5: -16'sd5570, 6: 16'sd3292, 7: -16'sd1395, 8: 16'sd408,
    default: 16'sd0};

  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

  // Placeholder CSP weight for output k (0 or 1) and channel c, in Q2.14.
  function automatic coef_t csp_default_weight(input int k, input int c);
    if (k == 0) return coef_t'(((c % 7) - 3) * 2048);   // (c mod 7 - 3) / 8
    else        return coef_t'(((c % 5) - 2) * 3072);   // (c mod 5 - 2) * 3/16
  endfunction

  // Placeholder CSP weight table built from csp_default_weight.
  function automatic csp_rom_t csp_default_rom();
    csp_rom_t r;
    for (int k = 0; k < 2; k++)
      for (int c = 0; c < MAX_CH; c++)
        r[k*MAX_CH + c] = csp_default_weight(k, c);
    return r;
  endfunction

  localparam csp_rom_t CSP_W_DEFAULT = csp_default_rom();

  // Shift-add approximation of x/400 used by the variance unit:
  // x/512 + x/2048 = 0.00244 x.
  function automatic logic signed [63:0] div400(input logic signed [63:0] x);
    return (x >>> 9) + (x >>> 11);
  endfunction

endpackage
