// tb_eeg_input_mux: drives channel and sample enables as the timer does (a
// channel enable every 3 to 6 clocks, a sample enable with every 59th) and
// checks, for 30 frames, that one clock after each channel enable the
// registered variant presents the sample of the next channel as it was on the
// frame's sample enable, even though data_in changes every clock, and that
// the unregistered variant presents the live data of that channel.
module tb_eeg_input_mux;
  import bci_pkg::*;
  localparam int N = 59;
  logic clk = 0, rst_n = 0, sample_en = 0, chan_en = 0;
  sample_t data_in [N], frame [N];
  logic v_r, v_d;
  logic [5:0] ch_r, ch_d;
  sample_t d_r, d_d;
  int checks = 0, failures = 0;

  eeg_input_mux #(.N_CH(N), .REG_INPUTS(1'b1)) dut_reg (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .chan_en(chan_en), .data_in(data_in),
    .out_valid(v_r), .out_ch(ch_r), .out_data(d_r));
  eeg_input_mux #(.N_CH(N), .REG_INPUTS(1'b0)) dut_dir (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .chan_en(chan_en), .data_in(data_in),
    .out_valid(v_d), .out_ch(ch_d), .out_data(d_d));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) for (int c = 0; c < N; c++) data_in[c] <= sample_t'($urandom);

  initial begin
    for (int c = 0; c < N; c++) data_in[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        chan_en = 1; sample_en = (c == 0);
        if (c == 0) frame = data_in;
        @(negedge clk);
        chan_en = 0; sample_en = 0;
        checks++;
        if (!v_r || int'(ch_r) != c || d_r !== frame[c]) begin
          failures++;
          if (failures < 10) $display("FAIL reg f=%0d c=%0d got ch %0d data %0d exp %0d", f, c, ch_r, d_r, frame[c]);
        end
        checks++;
        if (!v_d || int'(ch_d) != c || d_d !== data_in[c]) begin
          failures++;
          if (failures < 10) $display("FAIL direct f=%0d c=%0d", f, c);
        end
        repeat ($urandom_range(1, 4)) begin
          @(negedge clk);
          checks++;
          if (v_r || v_d) begin failures++; $display("FAIL out_valid without chan_en"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
