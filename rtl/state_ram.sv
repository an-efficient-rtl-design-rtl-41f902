// state_ram: memory for the partial sums of the time-shared filter banks.
//
// DEPTH words of WIDTH bits with one synchronous write port and one
// asynchronous read port, so a filter can read the partial sum of one order
// while it writes another in the same clock (Filter III), or read and
// overwrite a channel's partial sums in the same clock (Filter II; the read
// returns the old word, the write lands at the clock edge).
//
// The array is not reset; its users clear it after reset.
module state_ram #(
  parameter int DEPTH = 472,
  parameter int WIDTH = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

  always @(posedge clk) begin
    if (we) assert (32'(waddr) < DEPTH) else $error("state_ram: write address %0d out of range", waddr);
  end

endmodule
