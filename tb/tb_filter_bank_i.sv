// tb_filter_bank_i: feeds all 59 channels of Filter I with independent random
// and tone samples and checks every channel's output against its own
// reference filter one clock after each sample enable.
module tb_filter_bank_i;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  localparam int N = 59;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t x_in [N], y [N];
  int checks = 0, failures = 0;
  iir_ref model [N];
  longint exp [N];
  longint bq[], aq[];

  filter_bank_i dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq = new[9]; aq = new[9];
    for (int k = 0; k < 9; k++) begin bq[k] = IIR_B_DEFAULT[k]; aq[k] = IIR_A_DEFAULT[k]; end
    for (int c = 0; c < N; c++) begin model[c] = new(8, bq, aq); x_in[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1;
      for (int c = 0; c < N; c++) begin
        longint v;
        if (c % 2 == 0) v = longint'($rtoi(1500.0 * $sin(2.0 * 3.14159265 * (8.0 + c / 3.0) * n / 100.0)));
        else            v = longint'($signed(16'($urandom))) / 16;
        x_in[c] = sample_t'(v);
        exp[c]  = model[c].step(v);
      end
      @(negedge clk);
      en = 0;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (longint'(y[c]) != exp[c]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d ch=%0d got %0d exp %0d", n, c, y[c], exp[c]);
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
