// tb_csp: feeds 200 sets of 59 channel samples into the CSP unit, with
// random gaps and back-to-back enables, and compares both outputs with
// sum(w*x) >> 14 (saturated) computed from the default weight table. Checks
// that out_valid comes exactly 4 clocks after the enable of the last channel,
// once per set, and that init restarts a set.
module tb_csp;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int N = 59;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  sample_t data_in = 0, out1, out2;
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0, sets = 0, outs = 0;

  csp dut (.clk(clk), .rst_n(rst_n), .init(init), .en(en), .data_in(data_in),
           .out_valid(out_valid), .out1(out1), .out2(out2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint o1, o2; int due; } exp_t;
  exp_t q[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      outs++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
      else begin
        e = q.pop_front();
        if (longint'(out1) != e.o1 || longint'(out2) != e.o2 || cycle != e.due) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d/%0d %0d/%0d cycle %0d/%0d", out1, e.o1, out2, e.o2, cycle, e.due);
        end
      end
    end
  end

  task automatic run_set(int scale, bit b2b);
    longint s1 = 0, s2 = 0;
    for (int c = 0; c < N; c++) begin
      longint v = longint'($signed(16'($urandom))) / scale;
      en = 1; data_in = sample_t'(v);
      s1 += v * longint'(CSP_W_DEFAULT[c]);
      s2 += v * longint'(CSP_W_DEFAULT[MAX_CH + c]);
      if (c == N - 1) q.push_back('{o1: sat(fl_shift(s1, 14)), o2: sat(fl_shift(s2, 14)), due: cycle + 4});
      @(negedge clk);
      en = 0;
      if (!b2b) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    sets++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 200; s++) run_set((s % 4 == 3) ? 1 : 4, s % 3 == 0);
    // a partial set, then init: the next set must start from channel 0 again
    for (int c = 0; c < 17; c++) begin en = 1; data_in = 16'sd1000; @(negedge clk); end
    en = 0; init = 1; @(negedge clk); init = 0;
    repeat (5) @(negedge clk);
    run_set(4, 1'b0);
    repeat (8) @(negedge clk);
    checks++;
    if (outs != sets || q.size() != 0) begin failures++; $display("FAIL %0d sets %0d outputs", sets, outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
