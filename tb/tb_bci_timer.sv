// tb_bci_timer: runs the timer for one simulated second at the default 1 MHz
// working clock in both pacings. Spread (CH_CLKS = 0): exactly 5900 channel
// enables and 100 sample enables, each sample enable on a channel enable and
// every 59th one, with channel enables 169 or 170 clocks apart. Burst
// (CH_CLKS = 10, a second instance): each sample enable
// comes on the first channel enable of a burst of 59 enables exactly 10 clocks
// apart, and sample enables exactly 10000 clocks apart (100 of them; the
// last burst is cut off by the end of the second). Then stops run and
// checks that no enables come from either while it is low.
module tb_bci_timer;
  logic clk = 0, rst_n = 0, run = 0, chan_en, sample_en;
  int checks = 0, failures = 0, nchan = 0, nsamp = 0, last = -1, cycle = 0, since = 0;
  int min_gap = 1 << 30, max_gap = 0;
  logic chan_b, sample_b;
  int nchan_b = 0, nsamp_b = 0, last_b = -1, last_sb = -1, in_burst = 0;

  bci_timer dut (.clk(clk), .rst_n(rst_n), .run(run), .chan_en(chan_en), .sample_en(sample_en));

  bci_timer #(.CH_CLKS(10)) dut_b (.clk(clk), .rst_n(rst_n), .run(run), .chan_en(chan_b), .sample_en(sample_b));

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n && sample_b) begin
      checks++;
      if (!chan_b) begin failures++; $display("FAIL burst sample_en without chan_en"); end
      if (last_sb >= 0 && cycle - last_sb != 10000) begin
        failures++; $display("FAIL burst samples %0d clocks apart", cycle - last_sb);
      end
      if (last_sb >= 0 && in_burst != 59) begin failures++; $display("FAIL burst of %0d channels", in_burst); end
      last_sb = cycle;
      nsamp_b++;
      in_burst = 1;
      last_b = cycle;
      nchan_b++;
    end else if (rst_n && chan_b) begin
      checks++;
      if (cycle - last_b != 10) begin failures++; $display("FAIL burst channel gap %0d", cycle - last_b); end
      last_b = cycle;
      in_burst++;
      nchan_b++;
    end
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cycle++;
    if (rst_n && chan_en) begin
      if (last >= 0) begin
        if (cycle - last < min_gap) min_gap = cycle - last;
        if (cycle - last > max_gap) max_gap = cycle - last;
      end
      last = cycle;
      nchan++;
      if (sample_en) begin
        checks++;
        if (nsamp > 0 && since != 59) begin
          failures++; $display("FAIL %0d channel enables between sample enables", since);
        end
        nsamp++;
        since = 1;
      end else begin
        since++;
      end
    end else if (rst_n && sample_en) begin
      checks++; failures++; $display("FAIL sample_en without chan_en");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    repeat (1_000_000) @(negedge clk);
    run = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (nchan != 5900) begin failures++; $display("FAIL %0d channel enables", nchan); end
    checks++;
    if (nsamp != 100) begin failures++; $display("FAIL %0d sample enables", nsamp); end
    checks++;
    if (min_gap < 169 || max_gap > 170) begin failures++; $display("FAIL gaps %0d..%0d", min_gap, max_gap); end
    checks++;
    // the burst of the last sample (at clock 1e6) is cut off by stopping run
    if (nsamp_b != 100 || nchan_b != 59 * 99 + in_burst) begin
      failures++; $display("FAIL burst: %0d channel, %0d sample enables", nchan_b, nsamp_b);
    end
    repeat (2) @(negedge clk);
    nchan = 0;
    nchan_b = 0;
    repeat (1000) @(negedge clk);
    checks++;
    if (nchan != 0 || nchan_b != 0) begin failures++; $display("FAIL enables while stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
