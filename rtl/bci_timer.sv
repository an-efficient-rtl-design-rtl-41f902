// bci_timer: enable generator (timer / clock manager) of the BCI.
//
// The whole design runs on one working clock of CLK_HZ; the blocks are paced
// by enable pulses instead of derived clocks. sample_en pulses FS_HZ times per
// second (the EEG sampling rate) and chan_en N_CH times per sample, one EEG
// channel per pulse; sample_en always coincides with the chan_en of channel 0.
//
// Two pacings, chosen by CH_CLKS:
//   CH_CLKS = 0  spread: chan_en is evenly spread at FS_HZ*N_CH (5900 Hz by
//                default), so the filter works all the time at the lowest
//                possible clock.
//   CH_CLKS > 0  burst: after each sample_en the N_CH channel enables follow
//                back to back, CH_CLKS clocks apart, and the timer then waits
//                for the next sample. This gives the shortest response time
//                at a given working clock.
// A phase accumulator adds FS_HZ*N_CH (spread) or FS_HZ (burst) every clock
// and wraps at CLK_HZ, so the average rate is exact for any working clock
// (1e6/5900 is not an integer) and the working clock can be changed by
// changing CLK_HZ. Pulses are one clock wide and registered. Nothing counts
// while run is low. The phase accumulator and the two pacings are this
// implementation's choice; the design only requires a block that derives the
// enables from a variable working clock.
module bci_timer #(
  parameter int  CLK_HZ = 1_000_000,
  parameter int  FS_HZ  = 100,
  parameter int  N_CH   = 59,
  parameter int  CH_CLKS = 0,
  localparam int CW     = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic chan_en,
  output logic sample_en
);

  localparam longint STEP = (CH_CLKS == 0) ? longint'(FS_HZ) * longint'(N_CH)
                                           : longint'(FS_HZ);
  localparam int     GW   = (CH_CLKS > 1) ? $clog2(CH_CLKS) : 1;

  logic [31:0]   phase_q;
  logic [32:0]   phase_sum;
  logic [CW-1:0] ch_q;
  logic          chan_q, sample_q;
  logic          busy_q;   // burst: channel enables of a sample still due
  logic [GW-1:0] gap_q;    // burst: clocks until the next channel enable

  assign phase_sum = 33'(phase_q) + 33'(STEP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q  <= '0;
      ch_q     <= '0;
      chan_q   <= 1'b0;
      sample_q <= 1'b0;
      busy_q   <= 1'b0;
      gap_q    <= '0;
    end else begin
      chan_q   <= 1'b0;
      sample_q <= 1'b0;
      if (run) begin
        if (phase_sum >= 33'(CLK_HZ)) phase_q <= 32'(phase_sum - 33'(CLK_HZ));
        else                          phase_q <= 32'(phase_sum);
        if (CH_CLKS == 0) begin
          if (phase_sum >= 33'(CLK_HZ)) begin
            chan_q   <= 1'b1;
            sample_q <= (ch_q == '0);
            ch_q     <= (32'(ch_q) == N_CH - 1) ? '0 : ch_q + 1'b1;
          end
        end else if (phase_sum >= 33'(CLK_HZ)) begin
          // new sample: channel 0 now, the others follow
          chan_q   <= 1'b1;
          sample_q <= 1'b1;
          ch_q     <= (N_CH > 1) ? CW'(1) : '0;
          busy_q   <= (N_CH > 1);
          gap_q    <= GW'(CH_CLKS - 1);
        end else if (busy_q) begin
          if (gap_q == '0) begin
            chan_q <= 1'b1;
            ch_q   <= (32'(ch_q) == N_CH - 1) ? '0 : ch_q + 1'b1;
            busy_q <= (32'(ch_q) != N_CH - 1);
            gap_q  <= GW'(CH_CLKS - 1);
          end else begin
            gap_q <= gap_q - 1'b1;
          end
        end
      end
    end
  end

  assign chan_en   = chan_q;
  assign sample_en = sample_q;

  initial assert (longint'(FS_HZ) * longint'(N_CH) * ((CH_CLKS > 0) ? longint'(CH_CLKS) : 64'sd1)
                  <= longint'(CLK_HZ))
    else $error("bci_timer: CLK_HZ too low for FS_HZ*N_CH channel enables of CH_CLKS clocks");

endmodule
