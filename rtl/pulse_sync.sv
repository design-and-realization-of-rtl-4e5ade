// pulse_sync: carries a one-cycle pulse from one clock domain to another.
//
// The source pulse flips a toggle flop; the toggle crosses into the
// destination domain through two flops, and a change of the synchronised
// level gives a one-cycle pulse there.  Latency is two to three destination
// clocks.  Source pulses must be at least three destination clocks apart or
// they merge.  A helper of this design; the document names no such part.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic toggle;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n)     toggle <= 1'b0;
    else if (src_pulse) toggle <= ~toggle;

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], toggle};

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
