// tb_svm: random and boundary feature pairs; the class must equal the sign of
// W1*v1 + W2*v2 (default weights +1, -1), be updated only on en and be
// announced by class_valid exactly one clock after en.
module tb_svm;
  import bci_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, class_o, class_valid;
  var_t v1 = 0, v2 = 0;
  int checks = 0, failures = 0;

  svm dut (.clk(clk), .rst_n(rst_n), .en(en), .v1(v1), .v2(v2), .class_o(class_o), .class_valid(class_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(longint a, longint b);
    logic exp_c;
    logic prev;
    exp_c = (16384 * a - 16384 * b) < 0;
    prev = class_o;
    @(negedge clk); en = 1; v1 = var_t'(a); v2 = var_t'(b);
    checks++;
    if (class_valid !== 1'b0 || class_o !== prev) failures++;
    @(negedge clk); en = 0; v1 = var_t'($urandom); v2 = var_t'($urandom);
    checks++;
    if (class_valid !== 1'b1 || class_o !== exp_c) begin
      failures++;
      if (failures < 10) $display("FAIL v1=%0d v2=%0d class %0b exp %0b valid %0b", a, b, class_o, exp_c, class_valid);
    end
    @(negedge clk);
    checks++;
    if (class_valid !== 1'b0 || class_o !== exp_c) failures++;   // held without en
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    decide(100, 99); decide(99, 100); decide(5, 5); decide(0, 1);
    decide(-5, -6); decide(longint'(1) << 38, 0); decide(0, longint'(1) << 38);
    for (int i = 0; i < 3000; i++) begin
      longint a, b;
      a = longint'($urandom) << $urandom_range(0, 7);
      b = longint'($urandom) << $urandom_range(0, 7);
      decide(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
