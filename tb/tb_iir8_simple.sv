// tb_iir8_simple: drives the simple-form filter with an impulse, a step, a
// 15 Hz tone and random samples at irregular enable spacing and compares y
// with the reference TDF-II model one clock after every enable. Also checks
// the band-pass behaviour: the 15 Hz tone passes, DC is blocked.
module tb_iir8_simple;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  sample_t x_in, y;
  int checks = 0, failures = 0;
  iir_ref model;
  longint bq[], aq[];

  iir8_simple dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint peak;

  task automatic sample(longint xv, int gap);
    longint exp;
    @(negedge clk); en = 1; x_in = sample_t'(xv);
    @(negedge clk); en = 0;
    exp = model.step(xv);
    checks++;            // output valid one clock after en
    if (longint'(y) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d got %0d exp %0d", xv, y, exp);
    end
    if ((y < 0 ? -longint'(y) : longint'(y)) > peak) peak = (y < 0) ? -longint'(y) : longint'(y);
    repeat (gap) @(negedge clk);
    checks++;            // output holds between enables
    if (longint'(y) != exp) failures++;
  endtask

  initial begin
    bq = new[9]; aq = new[9];
    for (int k = 0; k < 9; k++) begin bq[k] = IIR_B_DEFAULT[k]; aq[k] = IIR_A_DEFAULT[k]; end
    model = new(8, bq, aq);
    x_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse
    sample(2048, 0);
    for (int n = 0; n < 99; n++) sample(0, n % 3);
    // DC step: output must settle near zero (band-pass blocks DC)
    for (int n = 0; n < 400; n++) sample(2048, 0);
    checks++;
    if (y > 40 || y < -40) begin failures++; $display("FAIL DC not blocked: %0d", y); end
    // 15 Hz tone at fs = 100 Hz, amplitude 1.0
    peak = 0;
    for (int n = 0; n < 400; n++) begin
      if (n == 200) peak = 0;
      sample(longint'($rtoi(2048.0 * $sin(2.0 * 3.14159265 * 15.0 * n / 100.0))), 1);
    end
    checks++;
    if (peak < 1600 || peak > 2600) begin failures++; $display("FAIL 15 Hz gain: peak %0d", peak); end
    // random, including saturating inputs
    for (int n = 0; n < 2000; n++) sample(longint'($signed(16'($urandom))) / ((n < 1500) ? 8 : 1), $urandom_range(0, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
