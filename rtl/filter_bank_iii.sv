// filter_bank_iii: Filter III, the RAM-based filter bank with one shared
// one_order tap.
//
// A single one_order cell computes every tap of every channel in sequence. An
// order counter steps the weight ROM (the numerator and denominator tables,
// parameters B and A) and, with the channel number, the address generator; a
// single state RAM of N_CH*ORDER words holds all partial sums.
//
// Sequence for one channel (ORDER+2 clocks, the rate the design quotes):
//   clock 0  start: the input register takes x_in, the channel register ch.
//   clock 1  order 0: y = b0*x + s_1; the filter output register takes y.
//   clock 1+k, k = 1..ORDER: s_k = b_k*x - a_k*y + s_{k+1} (s_{ORDER+1} = 0)
//            is written to the RAM while s_{k+1} is read for the next step.
// y_valid is high for one clock after the last order (clock ORDER+2), with
// y_ch the channel of y. ready is high when the bank is idle; start is only
// accepted then. After reset the controller clears the N_CH*ORDER RAM words,
// one per clock, before raising ready (this clearing is this implementation's
// choice). The order counter steps at the clock rate.
module filter_bank_iii
  import bci_pkg::*;
#(
  parameter int        N_CH  = 59,
  parameter int        ORDER = 8,
  parameter iir_coef_t B     = IIR_B_DEFAULT,
  parameter iir_coef_t A     = IIR_A_DEFAULT,
  localparam int       CW    = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int       KW    = $clog2(ORDER + 1),
  localparam int       AW    = $clog2(N_CH * ORDER),
  localparam int       DEPTH = N_CH * ORDER,
  localparam int       RW    = $clog2(MAX_ORDER + 1)
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

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_OUT, S_ORDER} state_t;

  state_t        state_q;
  sample_t       x_q;           // input register
  sample_t       y_q;           // filter output register
  logic [CW-1:0] ch_q;
  logic [KW-1:0] k_q;           // order counter
  logic [AW-1:0] clr_addr_q;
  logic          valid_q;

  logic [AW-1:0] raddr, waddr, ram_waddr;
  sample_t       ram_rdata, ram_wdata, par_in, par_out;
  coef_t         num, den;
  logic          ram_we;
  logic          last_order;    // counter carry out

  // Weight ROM.
  assign num = B[RW'(k_q)];
  assign den = (state_q == S_ORDER) ? A[RW'(k_q)] : '0;

  iir_addr_gen #(.N_CH(N_CH), .ORDER(ORDER)) u_agen (
    .ch(ch_q), .k(k_q), .raddr(raddr), .waddr(waddr)
  );

  assign last_order = (32'(k_q) == ORDER);
  assign par_in     = (state_q == S_ORDER && last_order) ? '0 : ram_rdata;

  one_order u_tap (
    .x(x_q), .y(y_q), .num(num), .den(den), .par_in(par_in), .par_out(par_out)
  );

  assign ram_we    = (state_q == S_CLEAR) || (state_q == S_ORDER);
  assign ram_waddr = (state_q == S_CLEAR) ? clr_addr_q : waddr;
  assign ram_wdata = (state_q == S_CLEAR) ? '0 : par_out;

  state_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(raddr),
    .rdata(ram_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_CLEAR;
      x_q        <= '0;
      y_q        <= '0;
      ch_q       <= '0;
      k_q        <= '0;
      clr_addr_q <= '0;
      valid_q    <= 1'b0;
    end else begin
      valid_q <= 1'b0;
      unique case (state_q)
        S_CLEAR: begin
          clr_addr_q <= clr_addr_q + 1'b1;
          if (32'(clr_addr_q) == DEPTH - 1) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (start) begin
            x_q     <= x_in;
            ch_q    <= ch;
            k_q     <= '0;
            state_q <= S_OUT;
          end
        end
        S_OUT: begin
          y_q     <= par_out;
          k_q     <= k_q + 1'b1;
          state_q <= S_ORDER;
        end
        S_ORDER: begin
          if (last_order) begin
            k_q     <= '0;
            valid_q <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        default: state_q <= S_CLEAR;
      endcase
    end
  end

  assign ready   = (state_q == S_IDLE);
  assign y_valid = valid_q;
  assign y_ch    = ch_q;
  assign y       = y_q;

  always @(posedge clk) begin
    if (rst_n && start) begin
      assert (state_q == S_IDLE || state_q == S_CLEAR)
        else $error("filter_bank_iii: start while busy");
      assert (32'(ch) < N_CH) else $error("filter_bank_iii: channel %0d out of range", ch);
    end
  end

endmodule
