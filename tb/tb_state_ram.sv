// tb_state_ram: random writes and reads of the partial-sum RAM against an
// array model; checks that a read in the clock of a write to the same word
// returns the old word and the new word one clock later.
module tb_state_ram;
  localparam int DEPTH = 472, AW = 9;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  bit          known [DEPTH];
  int checks = 0, failures = 0;

  state_ram #(.DEPTH(DEPTH), .WIDTH(16)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = 16'($urandom); model[a] = wdata; known[a] = 1;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; if (failures < 10) $display("FAIL rd %0d", a); end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = 16'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; if (failures < 10) $display("FAIL after write %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
