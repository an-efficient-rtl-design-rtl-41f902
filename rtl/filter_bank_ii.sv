// filter_bank_ii: Filter II, the RAM-based time-shared filter bank.
//
// One eighth-order TDF-II filter (ORDER+1 one_order taps) serves all N_CH
// channels in turn. Each partial register of the simple filter is replaced by
// a state_ram of N_CH words addressed by the channel number, so the RAM of
// order k holds s_k of every channel.
//
// Interface and timing. start loads the input register with x_in and the
// channel number ch. In the next clock the taps read that channel's partial
// sums, y is valid (combinational, y_valid high for one clock, y_ch = its
// channel) and the new partial sums are written back at the end of that
// clock. A new channel may start every clock, so the bank must be started
// N_CH times per sample period. After reset the controller clears all RAM
// words (N_CH clocks) before raising ready; start is ignored until then.
// The clearing sequence is this implementation's choice.
module filter_bank_ii
  import bci_pkg::*;
#(
  parameter int        N_CH  = 59,
  parameter int        ORDER = 8,
  parameter iir_coef_t B     = IIR_B_DEFAULT,
  parameter iir_coef_t A     = IIR_A_DEFAULT,
  localparam int       CW    = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] ch,
  input  sample_t       x_in,
  output logic          ready,
  output logic          y_valid,
  output logic [CW-1:0] y_ch,
  output sample_t       y
);

  sample_t       x_q;
  logic [CW-1:0] ch_q;
  logic          busy_q;          // computing the channel in ch_q this clock
  logic          clr_q;           // clearing the RAMs after reset
  logic [CW-1:0] clr_addr_q;

  sample_t       part_rd [1:ORDER];  // s_k of channel ch_q, read from RAM k
  sample_t       part_wr [1:ORDER];  // new s_k
  sample_t       zero;
  logic          ram_we;
  logic [CW-1:0] ram_addr;

  assign zero     = '0;
  assign ram_we   = clr_q | busy_q;
  assign ram_addr = clr_q ? clr_addr_q : ch_q;

  one_order u_tap0 (
    .x(x_q), .y(y), .num(B[0]), .den(zero), .par_in(part_rd[1]), .par_out(y)
  );

  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    one_order u_tap (
      .x      (x_q),
      .y      (y),
      .num    (B[k]),
      .den    (A[k]),
      .par_in (k < ORDER ? part_rd[k < ORDER ? k+1 : ORDER] : zero),
      .par_out(part_wr[k])
    );

    state_ram #(.DEPTH(N_CH), .WIDTH(DATA_W)) u_ram (
      .clk  (clk),
      .we   (ram_we),
      .waddr(ram_addr),
      .wdata(clr_q ? zero : part_wr[k]),
      .raddr(ram_addr),
      .rdata(part_rd[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q        <= '0;
      ch_q       <= '0;
      busy_q     <= 1'b0;
      clr_q      <= 1'b1;
      clr_addr_q <= '0;
    end else begin
      if (clr_q) begin
        if (32'(clr_addr_q) == N_CH - 1) clr_q <= 1'b0;
        clr_addr_q <= clr_addr_q + 1'b1;
      end
      busy_q <= start && !clr_q;
      if (start && !clr_q) begin
        x_q  <= x_in;
        ch_q <= ch;
      end
    end
  end

  assign ready   = !clr_q;
  assign y_valid = busy_q;
  assign y_ch    = ch_q;

  always @(posedge clk) begin
    if (rst_n && start && !clr_q)
      assert (32'(ch) < N_CH) else $error("filter_bank_ii: channel %0d out of range", ch);
  end

endmodule
