// tb_bci_top: end-to-end test of the whole BCI at its default configuration
// (design III, 59 channels, order 8, 400-sample window, 1 MHz clock, 100 Hz
// sampling). Runs 1000 EEG samples: for the first 500 a 15 Hz rhythm is on
// the channels that only the first CSP output weights, then on those that
// only the second one weights, with low-level noise everywhere.
//
// A reference model (bci_ref_pkg) filters every channel, projects, tracks
// both sliding variances and classifies; every CSP output, every variance and
// every decision of the design is compared with it. Also checked: each
// decision arrives exactly 603 clocks (0.603 ms) after its sample_en: the 59
// channels back to back, 10 clocks each, then CSP, variance and SVM. Mechanisms counted, each must occur: state RAM clearing before
// ready, full frames of 59 channels, window filling (window_full), window
// sliding (updates with a sample leaving the window), decisions of both
// classes and a change of class.
module tb_bci_top;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int N = 59, WIN = 400, FRAMES = 1000;

  logic clk = 0, rst_n = 0;
  sample_t eeg_in [N];
  logic ready, sample_en, csp_valid, var_valid, window_full, class_valid, class_o;
  sample_t csp_out [2];
  var_t var_out [2];

  bci_top dut (
    .clk(clk), .rst_n(rst_n), .eeg_in(eeg_in), .ready(ready), .sample_en(sample_en),
    .csp_valid(csp_valid), .csp_out(csp_out), .var_valid(var_valid), .var_out(var_out),
    .window_full(window_full), .class_valid(class_valid), .class_o(class_o));

  always #500 clk = ~clk;   // 1 MHz

  int checks = 0, failures = 0;
  int n_clear = 0, n_frames = 0, n_fill = 0, n_slide = 0, n_c0 = 0, n_c1 = 0, n_change = 0;
  int cycle = 0, max_lat = 0, min_lat = 1 << 30, frame_in = 0;
  logic last_class = 0, have_class = 0, full_q = 0;

  iir_ref filt [N];
  var_ref vm [2];
  longint bq[], aq[];
  typedef struct { longint o1, o2, v1, v2; logic cls; } exp_t;
  exp_t q_csp[$], q_var[$], q_cls[$];
  int   q_t[$];   // clock of each frame's sample_en

  initial begin
    repeat (FRAMES * 10000 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint gain(int c, bit pat_b);
    longint w1 = longint'(CSP_W_DEFAULT[c]), w2 = longint'(CSP_W_DEFAULT[MAX_CH + c]);
    if (!pat_b) return (w2 == 0 && w1 != 0) ? ((w1 > 0) ? 1 : -1) : 0;
    else        return (w1 == 0 && w2 != 0) ? ((w2 > 0) ? 1 : -1) : 0;
  endfunction

  // Next frame of EEG; also runs the reference chain on the frame sampled now.
  task automatic new_frame(int n);
    longint f [N];
    longint s1 = 0, s2 = 0;
    exp_t e;
    for (int c = 0; c < N; c++) begin
      f[c] = filt[c].step(longint'(eeg_in[c]));
      s1 += f[c] * longint'(CSP_W_DEFAULT[c]);
      s2 += f[c] * longint'(CSP_W_DEFAULT[MAX_CH + c]);
    end
    e.o1 = sat(fl_shift(s1, 14));
    e.o2 = sat(fl_shift(s2, 14));
    vm[0].step(e.o1);
    vm[1].step(e.o2);
    e.v1 = vm[0].v;
    e.v2 = vm[1].v;
    e.cls = (16384 * e.v1 - 16384 * e.v2) < 0;
    q_csp.push_back(e); q_var.push_back(e); q_cls.push_back(e);
    for (int c = 0; c < N; c++) begin
      real tone = 3072.0 * $sin(2.0 * 3.14159265 * 15.0 * (n + 1) / 100.0 + 0.3 * c);
      longint noise = longint'($urandom_range(0, 200)) - 100;
      eeg_in[c] <= sample_t'(longint'($rtoi(tone)) * gain(c, (n + 1) >= FRAMES / 2) + noise);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && sample_en) begin
      q_t.push_back(cycle);
      new_frame(frame_in);
      frame_in <= frame_in + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n && csp_valid) begin
      exp_t e;
      e = q_csp.pop_front();
      n_frames++;
      checks++;
      if (longint'(csp_out[0]) != e.o1 || longint'(csp_out[1]) != e.o2) begin
        failures++;
        if (failures < 10) $display("FAIL csp %0d/%0d %0d/%0d", csp_out[0], e.o1, csp_out[1], e.o2);
      end
    end
    if (rst_n && var_valid) begin
      exp_t e;
      e = q_var.pop_front();
      checks++;
      if (longint'(var_out[0]) != e.v1 || longint'(var_out[1]) != e.v2) begin
        failures++;
        if (failures < 10) $display("FAIL var %0d/%0d %0d/%0d", var_out[0], e.v1, var_out[1], e.v2);
      end
      if (full_q) n_slide++;
    end
    if (rst_n) begin
      if (window_full && !full_q) n_fill++;
      full_q = window_full;
    end
    if (rst_n && class_valid) begin
      exp_t e;
      int lat;
      e = q_cls.pop_front();
      lat = cycle - q_t.pop_front();
      checks++;
      if (class_o !== e.cls) begin
        failures++;
        if (failures < 10) $display("FAIL class %0b exp %0b", class_o, e.cls);
      end
      if (lat > max_lat) max_lat = lat;
      if (lat < min_lat) min_lat = lat;
      checks++;
      if (lat != 603) begin failures++; $display("FAIL decision %0d clocks after its sample", lat); end
      if (class_o) n_c1++; else n_c0++;
      if (have_class && class_o != last_class) n_change++;
      have_class = 1;
      last_class = class_o;
    end
  end

  initial begin
    bq = new[9]; aq = new[9];
    for (int k = 0; k < 9; k++) begin bq[k] = IIR_B_DEFAULT[k]; aq[k] = IIR_A_DEFAULT[k]; end
    for (int c = 0; c < N; c++) begin filt[c] = new(8, bq, aq); eeg_in[c] = 0; end
    vm[0] = new(WIN); vm[1] = new(WIN);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!ready) begin n_clear++; @(negedge clk); end
    wait (n_frames == FRAMES);
    repeat (100) @(negedge clk);
    $display("clear %0d clk, frames %0d, window filled %0d, slides %0d, class0 %0d, class1 %0d, changes %0d, latency %0d..%0d clk",
             n_clear, n_frames, n_fill, n_slide, n_c0, n_c1, n_change, min_lat, max_lat);
    checks++; if (n_clear == 0)  begin failures++; $display("FAIL no RAM clearing"); end
    checks++; if (n_fill != 1)   begin failures++; $display("FAIL window never filled"); end
    checks++; if (n_slide == 0)  begin failures++; $display("FAIL window never slid"); end
    checks++; if (n_c0 == 0 || n_c1 == 0) begin failures++; $display("FAIL one class never decided"); end
    checks++; if (n_change == 0) begin failures++; $display("FAIL class never changed"); end
    checks++; if (q_cls.size() > 1) begin failures++; $display("FAIL %0d decisions missing", q_cls.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
