// avalon_slave_regs: Avalon-MM slave register file of the image acquisition
// core.  The processor controls the core through it; it hands control pulses
// and register values to the master and the capture pipeline.
//
// Registers (word offsets, see img_cap_pkg):
//   0 CONTROL  W: bit0 GO starts a frame collection when the core is not
//              busy (GO reads back 0); bit1 CONT selects consecutive frames.
//   1 STATUS   R: bit0 FRAME_DONE, bit1 WRITE_DONE, bit2 BUSY.  Reading never
//              changes it; writing 0 clears FRAME_DONE and WRITE_DONE.
//   2 WRITE_ADDRESS  RW, 32-bit head address of the image in memory.
//   3 CURRENT_ADDRESS R, where the master writes next (next frame's head).
//   4..7 WIN_X, WIN_Y, WIN_W, WIN_H  RW, capture window in sensor pixels.
// From the document: GO, FRAME_DONE, WRITE_DONE, BUSY and their meaning,
// the write-0-clears rule and the 32-bit write_address.  Offsets, BUSY's bit
// position, CONT, CURRENT_ADDRESS and the window registers are this design's.
//
// BUSY is set by an accepted GO and cleared by the write_done of a frame when
// CONT is low.  FRAME_DONE is set by the end of a captured frame, WRITE_DONE
// by the master's write_done; both stay set until software writes 0.  BUSY
// reflects state and is not cleared by that write.
//
// Timing: zero-wait-state slave, readdata is combinational from address
// during a read.  frame_len = (WIN_W/2) * (WIN_H/2), the number of YUV words
// per frame (one per 2x2 Bayer quad).
module avalon_slave_regs
  import img_cap_pkg::*;
#(
  parameter logic [COORD_W-1:0] DEF_WIN_W = 11'd640,  // 320 x 240 output (QVGA)
  parameter logic [COORD_W-1:0] DEF_WIN_H = 11'd480
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon-MM slave
  input  logic [REG_ADDR_W-1:0] avs_address,
  input  logic                  avs_chipselect,
  input  logic                  avs_read,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  output logic [31:0]           avs_readdata,
  // events from the core (this clock domain)
  input  logic                  frame_done,
  input  logic                  write_done,
  input  logic [31:0]           cur_addr,
  // to the core
  output logic                  go,          // one-cycle pulse
  output logic                  cont,
  output logic [31:0]           head_addr,
  output window_t               win,
  output logic [FLEN_W-1:0]     frame_len
);
  logic st_frame_done, st_write_done, busy;
  logic wr, rd;
  logic [31:0] status;

  assign wr = avs_chipselect & avs_write;
  assign rd = avs_chipselect & avs_read;
  assign go = wr && avs_address == REG_CONTROL && |(avs_writedata & CMOS_GO_BIT) && !busy;
  assign status = (st_frame_done ? CMOS_FRAME_DONE_BIT : '0) |
                  (st_write_done ? CMOS_WRITE_DONE_BIT : '0) |
                  (busy          ? CMOS_BUSY_BIT       : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cont      <= 1'b0;
      head_addr <= '0;
      win       <= '{x: '0, y: '0, w: DEF_WIN_W, h: DEF_WIN_H};
    end else if (wr) begin
      unique case (avs_address)
        REG_CONTROL:   cont      <= |(avs_writedata & CMOS_CONT_BIT);
        REG_WRITE_ADR: head_addr <= avs_writedata;
        REG_WIN_X:     win.x     <= avs_writedata[COORD_W-1:0];
        REG_WIN_Y:     win.y     <= avs_writedata[COORD_W-1:0];
        REG_WIN_W:     win.w     <= avs_writedata[COORD_W-1:0];
        REG_WIN_H:     win.h     <= avs_writedata[COORD_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_frame_done <= 1'b0;
      st_write_done <= 1'b0;
      busy          <= 1'b0;
    end else begin
      if (wr && avs_address == REG_STATUS && avs_writedata == '0) begin
        st_frame_done <= 1'b0;
        st_write_done <= 1'b0;
      end
      if (frame_done) st_frame_done <= 1'b1;
      if (write_done) st_write_done <= 1'b1;
      if (go)                      busy <= 1'b1;
      else if (write_done && !cont) busy <= 1'b0;
    end
  end

  always_comb begin
    avs_readdata = '0;
    if (rd) begin
      unique case (avs_address)
        REG_CONTROL:   avs_readdata = cont ? CMOS_CONT_BIT : '0;
        REG_STATUS:    avs_readdata = status;
        REG_WRITE_ADR: avs_readdata = head_addr;
        REG_CUR_ADR:   avs_readdata = cur_addr;
        REG_WIN_X:     avs_readdata = {{(32-COORD_W){1'b0}}, win.x};
        REG_WIN_Y:     avs_readdata = {{(32-COORD_W){1'b0}}, win.y};
        REG_WIN_W:     avs_readdata = {{(32-COORD_W){1'b0}}, win.w};
        REG_WIN_H:     avs_readdata = {{(32-COORD_W){1'b0}}, win.h};
        default:       avs_readdata = '0;
      endcase
    end
  end

  assign frame_len = FLEN_W'(win.w[COORD_W-1:1]) * FLEN_W'(win.h[COORD_W-1:1]);
endmodule
