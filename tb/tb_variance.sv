// tb_variance: streams 1300 samples (random and tone segments, zero mean and
// offset) into the variance unit and compares var_out and mean_out after
// every sample with the recursive reference model, checks the 7-clock
// latency, window_full from the 400th sample on, and that the variance stays
// within 5% of 0.9766 x the exact window variance (the shift-add /400 scales
// the mean square by 400/409.6) for zero-mean segments.
module tb_variance;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int WIN = 400;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t din = 0, mean_out;
  logic var_valid, window_full;
  var_t var_out;
  int checks = 0, failures = 0, cycle = 0;
  var_ref model;

  variance #(.WIN(WIN)) dut (.clk(clk), .rst_n(rst_n), .start(start), .din(din),
    .var_valid(var_valid), .var_out(var_out), .mean_out(mean_out), .window_full(window_full));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    longint v;
    real ex;
    model = new(WIN);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1300; n++) begin
      if (n < 500)       v = longint'($signed(16'($urandom))) / 4;
      else if (n < 900)  v = longint'($rtoi(6000.0 * $sin(2.0 * 3.14159265 * 13.0 * n / 100.0)));
      else               v = 4000 + longint'($signed(16'($urandom))) / 16;
      start = 1; din = sample_t'(v); t0 = cycle;
      model.step(v);
      @(negedge clk);
      start = 0;
      while (!var_valid) @(negedge clk);
      checks++;
      if (cycle - t0 != 7) begin failures++; if (failures < 10) $display("FAIL latency %0d", cycle - t0); end
      checks++;
      if (longint'(var_out) != model.v || longint'(mean_out) != model.mean) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d var %0d exp %0d mean %0d exp %0d", n, var_out, model.v, mean_out, model.mean);
      end
      checks++;
      if (window_full !== (n >= WIN - 1)) begin failures++; $display("FAIL window_full at n=%0d", n); end
      if ((n == 499 || n == 899) ) begin
        ex = model.exact() * 0.9766;
        checks++;
        if ((real'(var_out) - ex) > 0.05 * ex || (ex - real'(var_out)) > 0.05 * ex) begin
          failures++; $display("FAIL n=%0d variance %0d vs scaled exact %f", n, var_out, ex);
        end
      end
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
