// dc_fifo: dual-clock FIFO carrying converted pixels from the sensor clock
// into the Avalon bus clock.
//
// The document names a "double clock FIFO" between the colour converter and
// the Avalon master; its depth, width and structure are this design's.
// Classic Gray-code design: binary read and write pointers with one extra
// wrap bit, their Gray images crossing to the other side through two flops,
// full and empty computed from the local pointer and the synchronised
// remote one.  Both flags are conservative (a slot freed on the other side
// is seen two to three clocks later).
//
// Interface: wr_en with !wfull stores wdata.  rdata always shows the oldest
// word (show-ahead) while !rempty; rd_en with !rempty removes it.  Writes
// when full are dropped and flagged by an assertion.
module dc_fifo #(
  parameter int unsigned DW = 24,
  parameter int unsigned AW = 8     // depth 2**AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          rempty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_next, rbin_next, wgray_next, rgray_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wbin_next  = wbin + (AW+1)'(wr_en && !wfull);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wclk)
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; wfull <= 1'b0;
    end else begin
      wbin  <= wbin_next;
      wgray <= wgray_next;
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      wfull <= (wgray_next == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  // read side
  assign rbin_next  = rbin + (AW+1)'(rd_en && !rempty);
  assign rgray_next = bin2gray(rbin_next);
  assign rdata      = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rempty <= 1'b1;
    end else begin
      rbin  <= rbin_next;
      rgray <= rgray_next;
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      rempty <= (rgray_next == wgray_r2);
    end
  end

  // A write must not be issued into a full FIFO (the word would be lost).
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !wfull)
    else $error("dc_fifo: write while full, word dropped");
endmodule
