// tb_window_fifo: pushes 1500 samples (with idle clocks between some) into
// the 400-sample window and checks that dout is zero while the window fills,
// then always the sample pushed 400 pushes earlier, and that full rises on
// the 400th push.
module tb_window_fifo;
  import bci_pkg::*;
  localparam int WIN = 400;
  logic clk = 0, rst_n = 0, push = 0, full;
  sample_t din = 0, dout;
  sample_t hist[$];
  int checks = 0, failures = 0;

  window_fifo #(.WIN(WIN)) dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .dout(dout), .full(full));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      sample_t exp_old;
      exp_old = (hist.size() == WIN) ? hist[0] : sample_t'(0);
      checks++;
      if (dout !== exp_old || full !== (hist.size() == WIN)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dout %0d exp %0d full %0b", n, dout, exp_old, full);
      end
      push = 1; din = sample_t'($urandom);
      hist.push_back(din);
      if (hist.size() > WIN) void'(hist.pop_front());
      @(negedge clk);
      push = 0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
