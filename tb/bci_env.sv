// bci_env: self-checking environment for one configuration of bci_top
// (FILTER_KIND, WIN, FRAMES, CLK_HZ, CH_CLKS), used to run designs I, II and III end
// to end at other settings than the defaults. It is the checker of
// tb_bci_top with the configuration as parameters: reference chain,
// comparison of every CSP output, variance and decision, a latency check
// (each decision within two sample periods of its sample, and exactly
// EXP_LAT clocks after it when given) and mechanism
// counts. done rises when the run is over; checks and failures are its
// tallies. It keeps checking until the simulation ends.
module bci_env #(
  parameter int FILTER_KIND = 1,
  parameter int WIN         = 100,
  parameter int FRAMES      = 300,
  parameter int CLK_HZ      = 1_000_000,
  parameter int CH_CLKS     = -1,  // -1: the default pacing of bci_top
  parameter int EXP_LAT     = -1   // exact latency in clocks, -1: not checked
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int N   = 59;
  localparam int CHC = (CH_CLKS >= 0) ? CH_CLKS : ((FILTER_KIND == 3) ? 10 : 1);

  logic clk = 0, rst_n = 0;
  sample_t eeg_in [N];
  logic ready, sample_en, csp_valid, var_valid, window_full, class_valid, class_o;
  sample_t csp_out [2];
  var_t var_out [2];

  bci_top #(.FILTER_KIND(FILTER_KIND), .WIN(WIN), .CLK_HZ(CLK_HZ), .CH_CLKS(CHC)) dut (
    .clk(clk), .rst_n(rst_n), .eeg_in(eeg_in), .ready(ready), .sample_en(sample_en),
    .csp_valid(csp_valid), .csp_out(csp_out), .var_valid(var_valid), .var_out(var_out),
    .window_full(window_full), .class_valid(class_valid), .class_o(class_o));

  always #500 clk = ~clk;   // 1 MHz

  initial begin checks = 0; failures = 0; done = 0; end
  int n_clear = 0, n_frames = 0, n_fill = 0, n_slide = 0, n_c0 = 0, n_c1 = 0, n_change = 0;
  int cycle = 0, max_lat = 0, min_lat = 1 << 30, frame_in = 0;
  logic last_class = 0, have_class = 0, full_q = 0;

  iir_ref filt [N];
  var_ref vm [2];
  longint bq[], aq[];
  typedef struct { longint o1, o2, v1, v2; logic cls; } exp_t;
  exp_t q_csp[$], q_var[$], q_cls[$];
  int   q_t[$];   // clock of each frame's sample_en

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
      if (EXP_LAT >= 0) begin
        checks++;
        if (lat != EXP_LAT) begin failures++; $display("FAIL latency %0d, expected %0d", lat, EXP_LAT); end
      end
      if (lat >= 2 * (CLK_HZ / 100)) begin failures++; $display("FAIL decision %0d clocks after its sample", lat); end
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
    $display("design %0d: clear %0d clk, frames %0d, window filled %0d, slides %0d, class0 %0d, class1 %0d, changes %0d, latency %0d..%0d clk",
             FILTER_KIND, n_clear, n_frames, n_fill, n_slide, n_c0, n_c1, n_change, min_lat, max_lat);
    checks++; if (FILTER_KIND != 1 && n_clear == 0) begin failures++; $display("FAIL no RAM clearing"); end
    checks++; if (n_fill != 1)   begin failures++; $display("FAIL window never filled"); end
    checks++; if (n_slide == 0)  begin failures++; $display("FAIL window never slid"); end
    checks++; if (n_c0 == 0 || n_c1 == 0) begin failures++; $display("FAIL one class never decided"); end
    checks++; if (n_change == 0) begin failures++; $display("FAIL class never changed"); end
    checks++; if (q_cls.size() > 1) begin failures++; $display("FAIL %0d decisions missing", q_cls.size()); end
    done = 1;
  end
endmodule
