// window_fifo: the sliding-window FIFO of the variance unit.
//
// A circular buffer of WIN samples. dout is the sample that leaves the window
// on the next push: the one pushed WIN pushes earlier, or zero while fewer
// than WIN samples have been pushed (the window starts empty, as if filled
// with zeros). On push the new sample overwrites that oldest word and the
// write pointer advances; push is a combined push and pop. dout is read
// combinationally, so a user registers it on the same clock as push (the
// Old_Value register). full goes high once WIN samples have been pushed.
module window_fifo
  import bci_pkg::*;
#(
  parameter int  WIN = 400,
  localparam int PW  = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int NW  = $clog2(WIN + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  sample_t din,
  output sample_t dout,
  output logic    full
);

  sample_t       mem [WIN];
  logic [PW-1:0] wp_q;
  logic [NW-1:0] cnt_q;

  assign full = (32'(cnt_q) == WIN);
  assign dout = full ? mem[wp_q] : '0;

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp_q  <= '0;
      cnt_q <= '0;
    end else if (push) begin
      wp_q <= (32'(wp_q) == WIN - 1) ? '0 : wp_q + 1'b1;
      if (!full) cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
