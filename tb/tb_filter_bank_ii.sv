// tb_filter_bank_ii: checks Filter II (one channel per clock, back-to-back starts included).
// Waits for ready after reset (state RAM cleared), then filters 120 samples
// of all 59 channels, visiting the channels in a new random order every
// sample period, and compares each output with that channel's reference
// filter. Checks y_ch, the latency from start to y_valid (1 clocks) and
// that exactly one y_valid comes per start.
module tb_filter_bank_ii;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int N = 59, LAT = 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] ch = 0, y_ch;
  sample_t x_in = 0, y;
  logic ready, y_valid;
  int checks = 0, failures = 0, cycle = 0, valids = 0, starts = 0;
  iir_ref model [N];
  longint bq[], aq[];

  filter_bank_ii dut (.clk(clk), .rst_n(rst_n), .start(start), .ch(ch), .x_in(x_in),
                      .ready(ready), .y_valid(y_valid), .y_ch(y_ch), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && y_valid) valids <= valids + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results in start order.
  typedef struct { int ch; longint y; int due; } exp_t;
  exp_t q[$];

  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected y_valid"); end
      else begin
        e = q.pop_front();
        if (int'(y_ch) != e.ch || longint'(y) != e.y || cycle != e.due) begin
          failures++;
          if (failures < 10) $display("FAIL ch %0d/%0d y %0d/%0d cycle %0d/%0d", y_ch, e.ch, y, e.y, cycle, e.due);
        end
      end
    end
  end

  initial begin
    int order [N];
    bq = new[9]; aq = new[9];
    for (int k = 0; k < 9; k++) begin bq[k] = IIR_B_DEFAULT[k]; aq[k] = IIR_A_DEFAULT[k]; end
    for (int c = 0; c < N; c++) model[c] = new(8, bq, aq);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready during RAM clearing"); end
    while (!ready) @(negedge clk);
    for (int n = 0; n < 120; n++) begin
      for (int c = 0; c < N; c++) order[c] = c;
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        longint v;
        int c;
        c = order[i];
        v = (c % 3 == 0) ? longint'($rtoi(3000.0 * $sin(2.0 * 3.14159265 * 12.0 * n / 100.0 + c)))
                         : longint'($signed(16'($urandom))) / 8;
        while (!ready) @(negedge clk);
        start = 1; ch = 6'(c); x_in = sample_t'(v);
        q.push_back('{ch: c, y: model[c].step(v), due: cycle + LAT});
        starts++;
        @(negedge clk);
        start = 0;
        if (!(1 && n % 2 == 0)) repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (valids != starts || q.size() != 0) begin
      failures++; $display("FAIL %0d starts, %0d outputs", starts, valids);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
