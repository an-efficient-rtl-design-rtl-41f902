// variance: recursive variance of the last WIN samples of one CSP output.
//
// Instead of summing WIN squares for every new sample, the unit updates the
// previous result with the sample that enters the window (new) and the one
// that leaves it (old, from window_fifo):
//   S   = S + new - old                       running sum (register na)
//   M_f = S / 400                             new mean    (register m4)
//   V_f = V_I + M_I^2 + new^2/400 - old^2/400 - M_f^2
// where V_I and M_I are the previous variance and mean (registers var, pa).
// Division by 400 is the shift-add x/512 + x/2048 (0.00244 x instead of
// 0.0025 x), used for all three divisions, so V + M^2 is consistently the
// scaled sum of squares of the window.
//
// Datapath: one squarer with input mux (mx2: pa, nv, ov, m4) into x2, one
// add/subtract on the sum (maa: nv, ov), one shift-add divider with input mux
// (md4: x2, na), one add/subtract on the variance (mvv: x2, d4). Schedule,
// one step per clock, the first in the clock of start:
//   1  nv <- new, ov <- old, FIFO push;   x2 <- pa^2
//   2  var += x2;  x2 <- nv^2;  na += nv
//   3  d4 <- x2/400;  x2 <- ov^2;  na -= ov
//   4  var += d4;  d4 <- x2/400
//   5  var -= d4;  m4 <- na/400
//   6  x2 <- m4^2
//   7  var -= x2;  pa <- m4
// var_valid is high for one clock after step 7 (7 clocks after start).
// start must not come while the unit is busy.
//
// Widths (this implementation's choice): new, old, mean Q5.11 (16 bits),
// squares Q10.22 (32 bits), sum Q14.11 (25 bits), variance Q18.22 (VAR_W).
// The shift-add divider and the register names follow the design; keeping
// the running sum in na rather than rebuilding it as 400 x mean (which would
// compound the divider's 2.3% error) and the exact step order are this
// implementation's choices. Reset clears the window and all registers.
module variance
  import bci_pkg::*;
#(
  parameter int WIN = 400
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,        // din holds a new sample
  input  sample_t din,
  output logic    var_valid,
  output var_t    var_out,      // variance, Q18.22
  output sample_t mean_out,     // mean, Q5.11
  output logic    window_full   // WIN samples have entered the window
);

  localparam int SQ_W  = 2 * DATA_W;
  localparam int SUM_W = DATA_W + 9;

  typedef logic signed [SQ_W-1:0]  sq_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  typedef enum logic [2:0] {ST_IDLE, ST_2, ST_3, ST_4, ST_5, ST_6, ST_7} step_t;
  typedef enum logic [1:0] {MX_PA, MX_NV, MX_OV, MX_M4} mx2_t;

  step_t   step_q;
  sample_t nv_q, ov_q, pa_q, m4_q;
  sq_t     x2_q, d4_q;
  sum_t    na_q;
  var_t    var_q;
  logic    valid_q;

  sample_t fifo_old;

  // Datapath controls, decoded from the step.
  mx2_t    mx2;
  logic    ld_x2, ld_var, var_sub, mvv_d4, ld_na, maa_ov, ld_d4, ld_m4;

  sample_t sq_in;
  sq_t     sq_out;
  sq_t     var_operand;
  sample_t na_operand;
  sq_t     d4_next;
  sample_t m4_next;

  window_fifo #(.WIN(WIN)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(start && step_q == ST_IDLE), .din(din),
    .dout(fifo_old), .full(window_full)
  );

  always_comb begin
    mx2 = MX_PA; ld_x2 = 1'b0;
    ld_var = 1'b0; var_sub = 1'b0; mvv_d4 = 1'b0;
    ld_na = 1'b0; maa_ov = 1'b0;
    ld_d4 = 1'b0; ld_m4 = 1'b0;
    unique case (step_q)
      ST_IDLE: begin mx2 = MX_PA; ld_x2 = start; end
      ST_2:    begin ld_var = 1'b1; mx2 = MX_NV; ld_x2 = 1'b1; ld_na = 1'b1; end
      ST_3:    begin ld_d4 = 1'b1; mx2 = MX_OV; ld_x2 = 1'b1; ld_na = 1'b1; maa_ov = 1'b1; end
      ST_4:    begin ld_var = 1'b1; mvv_d4 = 1'b1; ld_d4 = 1'b1; end
      ST_5:    begin ld_var = 1'b1; mvv_d4 = 1'b1; var_sub = 1'b1; ld_m4 = 1'b1; end
      ST_6:    begin mx2 = MX_M4; ld_x2 = 1'b1; end
      ST_7:    begin ld_var = 1'b1; var_sub = 1'b1; end
      default: ;
    endcase

    // mx2 and the squarer.
    unique case (mx2)
      MX_PA:   sq_in = pa_q;
      MX_NV:   sq_in = nv_q;
      MX_OV:   sq_in = ov_q;
      default: sq_in = m4_q;
    endcase
    sq_out = sq_in * sq_in;

    // mvv and maa.
    var_operand = mvv_d4 ? d4_q : x2_q;
    na_operand  = maa_ov ? ov_q : nv_q;

    // md4 and the divide-by-400 network: x2 in step 3 and 4, na in step 5.
    d4_next = sq_t'(div400(64'(x2_q)));
    m4_next = sample_t'(div400(64'(na_q)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q  <= ST_IDLE;
      nv_q    <= '0;
      ov_q    <= '0;
      pa_q    <= '0;
      m4_q    <= '0;
      x2_q    <= '0;
      d4_q    <= '0;
      na_q    <= '0;
      var_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= 1'b0;
      if (step_q == ST_IDLE && start) begin
        nv_q <= din;
        ov_q <= fifo_old;
      end
      if (ld_x2)  x2_q  <= sq_out;
      if (ld_var) var_q <= var_sub ? var_q - VAR_W'(var_operand) : var_q + VAR_W'(var_operand);
      if (ld_na)  na_q  <= maa_ov ? na_q - SUM_W'(na_operand) : na_q + SUM_W'(na_operand);
      if (ld_d4)  d4_q  <= d4_next;
      if (ld_m4)  m4_q  <= m4_next;
      unique case (step_q)
        ST_IDLE: if (start) step_q <= ST_2;
        ST_2:    step_q <= ST_3;
        ST_3:    step_q <= ST_4;
        ST_4:    step_q <= ST_5;
        ST_5:    step_q <= ST_6;
        ST_6:    step_q <= ST_7;
        ST_7: begin
          step_q  <= ST_IDLE;
          pa_q    <= m4_q;
          valid_q <= 1'b1;
        end
        default: step_q <= ST_IDLE;
      endcase
    end
  end

  assign var_valid = valid_q;
  assign var_out   = var_q;
  assign mean_out  = pa_q;

  always @(posedge clk) begin
    if (rst_n && start)
      assert (step_q == ST_IDLE) else $error("variance: start while busy");
  end

endmodule
