// tb_bci_designs: runs the BCI end to end in its other configurations, side
// by side, each with 59 channels, 100 Hz sampling, a 100-sample variance
// window and 300 EEG samples (rhythm switched after 150), and checks each
// against the reference model through bci_env:
//   env1  design I,   1 MHz, channels back to back (latency 71 clocks)
//   env2  design II,  1 MHz, channels back to back (72 clocks)
//   env3  design II,  5900 Hz, one clock per channel: the slowest clock
//   env4  design III, 59 kHz, ten clocks per channel: its slowest clock (603)
//   env5  design III, 1 MHz, channels spread evenly over the sample period
//   env6  design II,  1 MHz, channels spread evenly
// The default configuration (design III, 1 MHz, 400-sample window) is
// tb_bci_top.
module tb_bci_designs;
  logic done1, done2, done3, done4, done5, done6;
  int c1, f1, c2, f2, c3, f3, c4, f4, c5, f5, c6, f6;

  bci_env #(.FILTER_KIND(1), .WIN(100), .FRAMES(300), .EXP_LAT(71)) env1 (.done(done1), .checks(c1), .failures(f1));
  bci_env #(.FILTER_KIND(2), .WIN(100), .FRAMES(300), .EXP_LAT(72)) env2 (.done(done2), .checks(c2), .failures(f2));
  // The slowest working clocks: one clock per channel for design II
  // (5900 Hz) and ORDER+2 = 10 clocks per channel for design III (59 kHz).
  bci_env #(.FILTER_KIND(2), .WIN(100), .FRAMES(300), .CLK_HZ(5900), .CH_CLKS(0), .EXP_LAT(72)) env3 (.done(done3), .checks(c3), .failures(f3));
  bci_env #(.FILTER_KIND(3), .WIN(100), .FRAMES(300), .CLK_HZ(59000), .EXP_LAT(603)) env4 (.done(done4), .checks(c4), .failures(f4));
  // Even pacing at 1 MHz: channel slots of 169..170 clocks.
  bci_env #(.FILTER_KIND(3), .WIN(100), .FRAMES(300), .CH_CLKS(0)) env5 (.done(done5), .checks(c5), .failures(f5));
  bci_env #(.FILTER_KIND(2), .WIN(100), .FRAMES(300), .CH_CLKS(0)) env6 (.done(done6), .checks(c6), .failures(f6));

  initial begin
    #(64'd1000 * 64'd3_400_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5 + c6, f1 + f2 + f3 + f4 + f5 + f6 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2 && done3 && done4 && done5 && done6);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5 + c6, f1 + f2 + f3 + f4 + f5 + f6);
    $finish;
  end
endmodule
