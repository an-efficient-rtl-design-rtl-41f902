// tb_one_order: exhaustive-corner and random check of the one_order tap
// against the integer reference par_out = sat(floor((num*x - den*y)/2^11) + par_in).
module tb_one_order;
  import bci_pkg::*;
  import bci_ref_pkg::*;

  sample_t x, y, num, den, par_in, par_out;
  int checks = 0, failures = 0;

  one_order dut (.x(x), .y(y), .num(num), .den(den), .par_in(par_in), .par_out(par_out));

  task automatic apply(longint xi, longint yi, longint ni, longint di, longint pi);
    longint exp;
    x = sample_t'(xi); y = sample_t'(yi); num = sample_t'(ni); den = sample_t'(di); par_in = sample_t'(pi);
    #1;
    exp = tap(xi, yi, ni, di, pi);
    checks++;
    if (longint'(par_out) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d y=%0d num=%0d den=%0d pin=%0d: got %0d exp %0d", xi, yi, ni, di, pi, par_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Corners: unity, negatives, saturation both ways.
    apply(2048, 0, 2048, 0, 0);          // 1.0*1.0 = 1.0
    apply(-2048, 0, 2048, 0, 0);
    apply(1, 0, 1, 0, 0);                // below one LSB -> 0
    apply(-1, 0, 1, 0, 0);               // floors to -1
    apply(32767, -32768, 32767, 32767, 32767);   // saturate high
    apply(-32768, 32767, 32767, 32767, -32768);  // saturate low
    apply(1000, 500, 4939, -4939, 123);
    for (int i = 0; i < 20000; i++) begin
      longint xi, yi, ni, di, pi;
      xi = longint'($signed(16'($urandom)));
      yi = longint'($signed(16'($urandom)));
      ni = longint'($signed(16'($urandom)));
      di = longint'($signed(16'($urandom)));
      pi = longint'($signed(16'($urandom)));
      if (i % 2 == 0) begin   // realistic magnitudes, no saturation
        xi = xi / 16; yi = yi / 16; ni = ni / 4; di = di / 4; pi = pi / 4;
      end
      apply(xi, yi, ni, di, pi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
