// filter_bank_i: Filter I, the fully parallel filter bank.
//
// N_CH independent iir8_simple filters, one per EEG channel, all sharing the
// same coefficients and the same sample enable. This is the largest of the
// three filter banks (N_CH*(ORDER+1) one_order taps) and the fastest: every
// output is valid one clock after en, for all channels at once.
module filter_bank_i
  import bci_pkg::*;
#(
  parameter int        N_CH  = 59,
  parameter int        ORDER = 8,
  parameter iir_coef_t B     = IIR_B_DEFAULT,
  parameter iir_coef_t A     = IIR_A_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,            // sample enable
  input  sample_t x_in [N_CH],   // one sample per channel
  output sample_t y    [N_CH]    // filtered samples, valid one clock after en
);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    iir8_simple #(.ORDER(ORDER), .B(B), .A(A)) u_filt (
      .clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in[c]), .y(y[c])
    );
  end

endmodule
