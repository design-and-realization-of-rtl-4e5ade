// avalon_master_write: Avalon-MM write master that moves converted pixels
// into memory (SDRAM) at consecutive addresses.
//
// As in the document's partition, the master contains the dual-clock FIFO:
// YUV pixels are written into it on the pixel clock (pix_clk, pix_valid,
// pix_yuv) and read out on the bus clock.
//
// As the document describes it, the master issues basic (single, non-burst)
// write transfers, one data unit each, starting at the head address taken
// from the write_address register, and counts the units written.  When the
// count has reached one frame and the FIFO is empty, it signals write_done
// (CMOS_WRITE_DONE_BIT: the frame is in memory).
//
// This design's choices: one data unit is one pixel, packed as
// {8'h00, Y, U, V} in a 32-bit word, and the address advances by 4 bytes
// per unit; writedata[31:24] is therefore constant 0 and byteenable is
// constant 4'hF.  start reloads the address from head_addr and clears the count.
// After write_done the address keeps running, so consecutive frames land
// back to back and cur_addr is the head address of the next frame.
//
// Avalon timing: write, address and writedata are held while waitrequest is
// high; a transfer completes on a clock with write high and waitrequest low.
// With waitrequest low the master sustains one write per clock.
module avalon_master_write
  import img_cap_pkg::*;
#(
  parameter int unsigned AW      = 32,
  parameter int unsigned FIFO_AW = 8     // FIFO depth 2**FIFO_AW pixels
) (
  input  logic              clk,
  input  logic              rst_n,
  // control from the slave registers
  input  logic              start,
  input  logic [AW-1:0]     head_addr,
  input  logic [FLEN_W-1:0] frame_len,   // data units per frame
  output logic [AW-1:0]     cur_addr,
  output logic              write_done,  // one-cycle pulse
  // pixels from the colour converter, pixel clock domain
  input  logic              pix_clk,
  input  logic              pix_rst_n,
  input  logic              pix_valid,
  input  yuv_t              pix_yuv,
  // Avalon-MM master
  output logic [AW-1:0]     avm_address,
  output logic              avm_write,
  output logic [31:0]       avm_writedata,
  output logic [3:0]        avm_byteenable,
  input  logic              avm_waitrequest
);
  logic [FLEN_W:0] count;
  logic            accept, load;
  logic            fifo_empty, fifo_rd, fifo_full;
  yuv_t            fifo_data;

  dc_fifo #(.DW($bits(yuv_t)), .AW(FIFO_AW)) u_fifo (
    .wclk(pix_clk), .wrst_n(pix_rst_n), .wr_en(pix_valid), .wdata(pix_yuv), .wfull(fifo_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(fifo_rd), .rdata(fifo_data), .rempty(fifo_empty)
  );

  assign accept  = avm_write && !avm_waitrequest;          // transfer completes
  assign load    = (!avm_write || accept) && !fifo_empty;  // next unit taken
  assign fifo_rd = load && !start;
  assign avm_byteenable = 4'hF;
  assign cur_addr = avm_address + (avm_write ? AW'(4) : AW'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avm_address   <= '0;
      avm_write     <= 1'b0;
      avm_writedata <= '0;
      count         <= '0;
      write_done    <= 1'b0;
    end else begin
      write_done <= 1'b0;
      if (start) begin
        avm_address <= head_addr;
        avm_write   <= 1'b0;
        count       <= '0;
      end else begin
        if (accept) avm_address <= avm_address + AW'(4);
        if (load) begin
          avm_write     <= 1'b1;
          avm_writedata <= {8'h00, fifo_data};
        end else if (accept) begin
          avm_write <= 1'b0;
        end
        if (count >= {1'b0, frame_len} && frame_len != '0 && fifo_empty && !avm_write) begin
          write_done <= 1'b1;
          count      <= count - {1'b0, frame_len} + (FLEN_W+1)'(accept);
        end else begin
          count <= count + (FLEN_W+1)'(accept);
        end
      end
    end
  end

  // Avalon rule: a master holds its request stable while waitrequest is high.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (avm_write && avm_waitrequest && !start) |=>
        (avm_write && $stable(avm_address) && $stable(avm_writedata)))
    else $error("avalon_master_write: request changed under waitrequest");
endmodule
