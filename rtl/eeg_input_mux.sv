// eeg_input_mux: input registers, channel counter and channel multiplexer.
//
// The N_CH input registers (REG_INPUTS = 1) take all channels of data_in on
// sample_en. A channel counter steps on every chan_en and wraps after N_CH;
// the multiplexer then presents one channel per chan_en to the filter bank:
// one clock after chan_en, out_valid is high for one clock with out_ch and
// out_data = that channel's sample. The extra clock lets the multiplexer see
// the registers that the sample_en of the same clock has just loaded. With
// REG_INPUTS = 0 the registers are left out and data_in is multiplexed
// directly (design I, where the multiplexer follows the filter bank, whose
// outputs are already held). sample_en must coincide with the chan_en of
// channel 0, as bci_timer produces them.
module eeg_input_mux
  import bci_pkg::*;
#(
  parameter int  N_CH       = 59,
  parameter bit  REG_INPUTS = 1'b1,
  localparam int CW         = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_en,
  input  logic          chan_en,
  input  sample_t       data_in [N_CH],
  output logic          out_valid,
  output logic [CW-1:0] out_ch,
  output sample_t       out_data
);

  sample_t       held [N_CH];
  logic [CW-1:0] ch_q, sel_q;
  logic          go_q;

  if (REG_INPUTS) begin : g_reg
    sample_t regs_q [N_CH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int c = 0; c < N_CH; c++) regs_q[c] <= '0;
      end else if (sample_en) begin
        regs_q <= data_in;
      end
    end
    assign held = regs_q;
  end else begin : g_noreg
    assign held = data_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_q  <= '0;
      sel_q <= '0;
      go_q  <= 1'b0;
    end else begin
      go_q <= chan_en;
      if (chan_en) begin
        sel_q <= ch_q;
        ch_q  <= (32'(ch_q) == N_CH - 1) ? '0 : ch_q + 1'b1;
      end
    end
  end

  assign out_valid = go_q;
  assign out_ch    = sel_q;
  assign out_data  = held[sel_q];

  always @(posedge clk) begin
    if (rst_n && sample_en)
      assert (chan_en && ch_q == '0) else $error("eeg_input_mux: sample_en not at channel 0");
  end

endmodule
