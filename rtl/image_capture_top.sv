// image_capture_top: image acquisition core for an Avalon-MM (SOPC) system.
//
// A CMOS image sensor (MT9M011: FRAME_VALID, LINE_VALID, 10-bit DOUT on
// PIXCLK) streams Bayer pixels in.  The core captures whole frames on
// request, demosaics each 2x2 Bayer quad into one RGB pixel, converts it to
// YUV, passes it through a dual-clock FIFO into the bus clock and writes it
// with an Avalon-MM master into memory (SDRAM) from a programmed head
// address.  A processor drives it through an Avalon-MM slave register file
// (GO / CONT control, FRAME_DONE / WRITE_DONE / BUSY status, write address,
// capture window).
//
// Chain (as the document partitions it):
//   cmos_capture -> bayer2rgb (with line_buffer) -> rgb2yuv
//   -> avalon_master_write (with dc_fifo);  avalon_slave_regs controls them.
// Clock domains: pixclk for the sensor side up to the FIFO write port, clk
// (the Avalon bus clock, 100 MHz in the reference system) for the FIFO read
// port, master and slave.  GO and frame-done cross as pulses through
// pulse_sync; CONT is synchronised inside cmos_capture.  The window
// registers are used in the pixel domain without synchronisers: they must
// only be changed while the core is not busy (this design's rule).
// The 10-bit sensor word is cut to its 8 most significant bits at the
// demosaic input, since the row buffer is 8 bits wide.
//
// Reset: one active-low asynchronous reset, rst_n, for both domains; it is
// expected to be released synchronously to each clock by the system.
module image_capture_top
  import img_cap_pkg::*;
#(
  parameter int unsigned LINE_W  = 1280,  // sensor active pixels per line
  parameter int unsigned FIFO_AW = 8      // FIFO depth 2**FIFO_AW pixels
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon-MM slave (control and status)
  input  logic [REG_ADDR_W-1:0] avs_address,
  input  logic                  avs_chipselect,
  input  logic                  avs_read,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  output logic [31:0]           avs_readdata,
  // Avalon-MM master (to the SDRAM controller)
  output logic [31:0]           avm_address,
  output logic                  avm_write,
  output logic [31:0]           avm_writedata,
  output logic [3:0]            avm_byteenable,
  input  logic                  avm_waitrequest,
  // CMOS image sensor
  input  logic                  pixclk,
  input  logic                  frame_valid,
  input  logic                  line_valid,
  input  logic [9:0]            sensor_data
);
  // Avalon clock domain
  logic              go, cont, wr_done, fd_avl;
  logic [31:0]       head_addr, cur_addr;
  window_t           win;
  logic [FLEN_W-1:0] frame_len;
  // pixel clock domain
  logic              go_pix, fd_pix;
  logic              pix_valid;
  logic [9:0]        pix_data;
  coord_t            px, py;
  logic              rgb_valid, yuv_valid;
  rgb_t              rgb;
  yuv_t              yuv;

  avalon_slave_regs u_slave (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .frame_done(fd_avl), .write_done(wr_done), .cur_addr,
    .go, .cont, .head_addr, .win, .frame_len
  );

  pulse_sync u_go_sync (
    .src_clk(clk), .src_rst_n(rst_n), .src_pulse(go),
    .dst_clk(pixclk), .dst_rst_n(rst_n), .dst_pulse(go_pix)
  );

  cmos_capture #(.DATA_W(10)) u_capture (
    .clk(pixclk), .rst_n,
    .frame_valid, .line_valid, .data(sensor_data),
    .start(go_pix), .cont,
    .pix_valid, .pix_data, .x(px), .y(py),
    .frame_done(fd_pix)
  );

  pulse_sync u_fd_sync (
    .src_clk(pixclk), .src_rst_n(rst_n), .src_pulse(fd_pix),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(fd_avl)
  );

  bayer2rgb #(.LINE_W(LINE_W), .NUM_TAPS(2)) u_bayer (
    .clk(pixclk), .rst_n,
    .pix_valid, .pix_data(pix_data[9:2]), .x(px), .y(py), .win,
    .rgb_valid, .rgb
  );

  rgb2yuv u_yuv (
    .clk(pixclk), .rst_n, .rgb_valid, .rgb, .yuv_valid, .yuv
  );

  avalon_master_write #(.AW(32), .FIFO_AW(FIFO_AW)) u_master (
    .clk, .rst_n,
    .start(go), .head_addr, .frame_len, .cur_addr, .write_done(wr_done),
    .pix_clk(pixclk), .pix_rst_n(rst_n), .pix_valid(yuv_valid), .pix_yuv(yuv),
    .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest
  );
endmodule
