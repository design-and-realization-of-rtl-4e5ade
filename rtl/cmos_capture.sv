// cmos_capture: timing judge for a CMOS image sensor with FRAME_VALID /
// LINE_VALID framing (MT9M011 style).
//
// A pixel is valid when FRAME_VALID and LINE_VALID are both high on a PIXCLK
// edge.  For each valid pixel of a captured frame the module outputs the data
// word, a valid flag and its column (x) and row (y) count inside the frame.
// The falling edge of FRAME_VALID (the rising edge of its inverse) ends a
// frame; for a captured frame it produces a one-cycle frame_done pulse, which
// sets FRAME_DONE in the status register.
//
// Capture control (this design's choice): a start pulse arms the module; it
// captures the next whole frame, from the next rising edge of FRAME_VALID, so
// a frame is never captured from its middle.  When cont is high at the end of
// a frame it re-arms itself and takes the next frame too (consecutive-frame
// mode).  cont comes from another clock domain and is synchronised here.
//
// Timing: sensor inputs are registered once, outputs once more, so pix_valid,
// pix_data, x and y appear two PIXCLK cycles after the sensor presents the
// pixel.  x counts from 0 at the first valid pixel of each line; y counts
// lines from 0 at the start of the frame.
module cmos_capture
  import img_cap_pkg::*;
#(
  parameter int unsigned DATA_W = 10   // MT9M011 DOUT9..DOUT0
) (
  input  logic              clk,          // sensor PIXCLK
  input  logic              rst_n,
  // sensor
  input  logic              frame_valid,
  input  logic              line_valid,
  input  logic [DATA_W-1:0] data,
  // control
  input  logic              start,        // one-cycle pulse, PIXCLK domain
  input  logic              cont,         // asynchronous level
  // pixel stream
  output logic              pix_valid,
  output logic [DATA_W-1:0] pix_data,
  output coord_t            x,
  output coord_t            y,
  output logic              frame_done    // one-cycle pulse at end of a captured frame
);
  logic              fv_q, lv_q, fv_qq, lv_qq;
  logic [DATA_W-1:0] d_q;
  logic [1:0]        cont_sync;
  logic              armed, active;
  coord_t            xcnt, ycnt;

  wire fv_rise = fv_q & ~fv_qq;
  wire fv_fall = ~fv_q & fv_qq;
  wire lv_fall = ~lv_q & lv_qq;
  wire valid_q = fv_q & lv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_q <= 1'b0; lv_q <= 1'b0; fv_qq <= 1'b0; lv_qq <= 1'b0;
      d_q  <= '0;
      cont_sync <= '0;
    end else begin
      fv_q <= frame_valid; lv_q <= line_valid;
      fv_qq <= fv_q;       lv_qq <= lv_q;
      d_q  <= data;
      cont_sync <= {cont_sync[0], cont};
    end
  end

  // arm / capture state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= 1'b0;
      active <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (fv_rise && (armed || start)) begin
        active <= 1'b1;
        armed  <= 1'b0;
      end else if (fv_fall && active) begin
        active     <= 1'b0;
        frame_done <= 1'b1;
        armed      <= cont_sync[1] | start;
      end else if (start) begin
        armed <= 1'b1;
      end
    end
  end

  // row / column counters inside the frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt <= '0;
      ycnt <= '0;
    end else begin
      xcnt <= valid_q ? xcnt + 1'b1 : '0;
      if (!fv_q)        ycnt <= '0;
      else if (lv_fall) ycnt <= ycnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_data  <= '0;
      x <= '0;
      y <= '0;
    end else begin
      pix_valid <= valid_q & (active | (fv_rise & (armed | start)));
      pix_data  <= d_q;
      x <= xcnt;
      y <= ycnt;
    end
  end
endmodule
