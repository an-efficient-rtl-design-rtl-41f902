// iir_addr_gen: address generator of Filter III's state RAM.
//
// The single state RAM holds ORDER partial sums per channel, channel-major:
// word ch*ORDER + (k-1) holds s_k of channel ch. While order k of channel ch
// is being computed the filter reads s_{k+1} (raddr = ch*ORDER + k) and writes
// the new s_k (waddr = ch*ORDER + k - 1). Combinational. The layout is this
// implementation's choice; the design names the block but not its formula.
module iir_addr_gen #(
  parameter int  N_CH  = 59,
  parameter int  ORDER = 8,
  localparam int CW    = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int KW    = $clog2(ORDER + 1),
  localparam int AW    = $clog2(N_CH * ORDER)
) (
  input  logic [CW-1:0] ch,     // channel address
  input  logic [KW-1:0] k,      // order being computed (0..ORDER)
  output logic [AW-1:0] raddr,  // word of s_{k+1}
  output logic [AW-1:0] waddr   // word of s_k
);

  logic [AW:0] base;

  always_comb begin
    base  = (AW+1)'(ch) * (AW+1)'(ORDER);
    raddr = AW'(base + (AW+1)'(k));
    waddr = AW'(base + (AW+1)'(k) - (AW+1)'(1));
  end

endmodule
