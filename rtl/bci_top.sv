// bci_top: motor-imagery brain-computer interface, from digitised EEG to a
// two-class decision.
//
// Dataflow: N_CH EEG channels sampled at FS_HZ -> 8th-order IIR band-pass
// filter per channel (8-30 Hz) -> CSP projection onto two signals -> variance
// of each signal over the last WIN samples -> linear SVM -> class bit, the
// command for the external device. A new decision follows every EEG sample.
//
// FILTER_KIND selects the filter bank and with it one of three variants:
//   1  design I:   Filter I, one filter per channel, all updated at FS_HZ; the
//                  channel multiplexer follows the filters.
//   2  design II:  input registers and multiplexer, then Filter II (shared
//                  taps, state in RAMs), one channel per chan_en.
//   3  design III: as design II with Filter III (one shared tap, one state
//                  RAM, ORDER+2 clocks per channel). Default: the smallest
//                  and lowest-power variant.
// bci_timer paces everything from the working clock CLK_HZ with a sample
// enable (FS_HZ) and N_CH channel enables per sample. By default the channels
// of a sample follow the sample enable back to back, CH_CLKS clocks apart
// (1 for designs I and II, ORDER+2 for design III); CH_CLKS = 0 spreads them
// evenly over the sample period instead (FS_HZ*N_CH per second). The CSP
// unit takes one channel per filter output and emits its two outputs after
// the last channel; both variance units start together and the SVM decides
// when they finish.
//
// Interface: eeg_in holds one Q5.11 sample per channel and is sampled on the
// clock where sample_en is high. ready rises once the filter state RAMs are
// cleared after reset; the timer runs from then on. csp_*, var_* and
// window_full expose the features; class_o/class_valid carry the decision.
// Latency from sample_en to class_valid: the last channel is presented
// (N_CH-1) channel slots after sample_en, then 1 (multiplexer) + filter
// latency (1, 1 or ORDER+2) + 4 (CSP) + 7 (variance) + 1 (SVM) clocks. With
// the default back-to-back pacing that is 603 clocks for design III, 72 for
// design II and 71 for design I, whose filters have already finished when
// the multiplexer starts (0.60 and 0.07 ms at 1 MHz); spread evenly at 1 MHz
// it is about 9850 clocks.
// Reset: synchronous, active low, on every block.
module bci_top
  import bci_pkg::*;
#(
  parameter int  FILTER_KIND = 3,
  parameter int  N_CH        = 59,
  parameter int  ORDER       = 8,
  parameter int  WIN         = 400,
  parameter int  CLK_HZ      = 1_000_000,
  parameter int  FS_HZ       = 100,
  parameter int  CH_CLKS     = (FILTER_KIND == 3) ? ORDER + 2 : 1,
  localparam int CW          = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t eeg_in [N_CH],
  output logic    ready,
  output logic    sample_en,
  output logic    csp_valid,
  output sample_t csp_out [2],
  output logic    var_valid,
  output var_t    var_out [2],
  output logic    window_full,
  output logic    class_valid,
  output logic    class_o
);

  logic          run_q;
  logic          chan_en, samp_en;
  logic          filt_ready;
  logic          mux_valid;
  logic [CW-1:0] mux_ch;
  sample_t       mux_data;
  logic          filt_valid;
  sample_t       filt_y;
  logic [1:0]    var_v, full_v;
  sample_t       mean_unused [2];

  // The timer starts once the filter bank is ready and then runs for good.
  always_ff @(posedge clk) begin
    if (!rst_n)          run_q <= 1'b0;
    else if (filt_ready) run_q <= 1'b1;
  end

  bci_timer #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .N_CH(N_CH), .CH_CLKS(CH_CLKS)) u_timer (
    .clk(clk), .rst_n(rst_n), .run(run_q), .chan_en(chan_en), .sample_en(samp_en)
  );

  if (FILTER_KIND == 1) begin : g_design_i
    sample_t filt_all [N_CH];

    filter_bank_i #(.N_CH(N_CH), .ORDER(ORDER)) u_filter (
      .clk(clk), .rst_n(rst_n), .en(samp_en), .x_in(eeg_in), .y(filt_all)
    );

    eeg_input_mux #(.N_CH(N_CH), .REG_INPUTS(1'b0)) u_mux (
      .clk(clk), .rst_n(rst_n), .sample_en(samp_en), .chan_en(chan_en),
      .data_in(filt_all), .out_valid(mux_valid), .out_ch(mux_ch), .out_data(mux_data)
    );

    assign filt_ready = 1'b1;
    assign filt_valid = mux_valid;
    assign filt_y     = mux_data;
  end else begin : g_design_ii_iii
    logic [CW-1:0] y_ch_unused;

    eeg_input_mux #(.N_CH(N_CH), .REG_INPUTS(1'b1)) u_mux (
      .clk(clk), .rst_n(rst_n), .sample_en(samp_en), .chan_en(chan_en),
      .data_in(eeg_in), .out_valid(mux_valid), .out_ch(mux_ch), .out_data(mux_data)
    );

    if (FILTER_KIND == 2) begin : g_filter_ii
      filter_bank_ii #(.N_CH(N_CH), .ORDER(ORDER)) u_filter (
        .clk(clk), .rst_n(rst_n), .start(mux_valid), .ch(mux_ch), .x_in(mux_data),
        .ready(filt_ready), .y_valid(filt_valid), .y_ch(y_ch_unused), .y(filt_y)
      );
    end else begin : g_filter_iii
      filter_bank_iii #(.N_CH(N_CH), .ORDER(ORDER)) u_filter (
        .clk(clk), .rst_n(rst_n), .start(mux_valid), .ch(mux_ch), .x_in(mux_data),
        .ready(filt_ready), .y_valid(filt_valid), .y_ch(y_ch_unused), .y(filt_y)
      );
    end
  end

  csp #(.N_CH(N_CH)) u_csp (
    .clk(clk), .rst_n(rst_n), .init(!run_q), .en(filt_valid), .data_in(filt_y),
    .out_valid(csp_valid), .out1(csp_out[0]), .out2(csp_out[1])
  );

  for (genvar j = 0; j < 2; j++) begin : g_var
    variance #(.WIN(WIN)) u_var (
      .clk(clk), .rst_n(rst_n), .start(csp_valid), .din(csp_out[j]),
      .var_valid(var_v[j]), .var_out(var_out[j]), .mean_out(mean_unused[j]),
      .window_full(full_v[j])
    );
  end

  svm u_svm (
    .clk(clk), .rst_n(rst_n), .en(&var_v), .v1(var_out[0]), .v2(var_out[1]),
    .class_o(class_o), .class_valid(class_valid)
  );

  assign ready       = run_q;
  assign sample_en   = samp_en;
  assign var_valid   = &var_v;
  assign window_full = &full_v;

  // Channel slots must be long enough for the filter bank.
  initial assert (FILTER_KIND != 3 ||
                  (CH_CLKS == 0 ? CLK_HZ / (FS_HZ * N_CH) : CH_CLKS) >= ORDER + 2)
    else $error("bci_top: channel slots too short for Filter III");
  initial assert (FILTER_KIND >= 1 && FILTER_KIND <= 3)
    else $error("bci_top: FILTER_KIND must be 1, 2 or 3");

endmodule
