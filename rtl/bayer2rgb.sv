// bayer2rgb: turns a Bayer-pattern pixel stream into RGB pixels.
//
// Sensor pattern (from the document): even rows hold green and red, odd rows
// blue and green; even columns hold green and blue, odd columns red and
// green.  So (row,col) = (even,even) G, (even,odd) R, (odd,even) B and
// (odd,odd) G.
//
// How it works: a line_buffer (two taps, tap distance LINE_W, 8 bits, as the
// document configures it) holds the previous row.  When the row/column
// counts of the incoming pixel are both odd, the 2x2 quad that ends at that
// pixel is complete: R comes from the row buffer (pixel above), B from the
// pixel to the left, and G is the mean of the two greens.  One RGB pixel is
// produced per quad, so the RGB image is half the window size in each
// direction.  The second tap is part of the configured buffer; this
// demosaic reads only the first.  Taking one pixel per quad and averaging
// the greens is this design's reading of "G components are interpolated and
// combined with the R, B cache components".
//
// Window (this design's choice): only quads whose top-left pixel lies
// inside the window win (sensor coordinates; x, y, w, h rounded down to
// even) produce output.
//
// Timing: rgb_valid/rgb follow the odd/odd input pixel by two clocks.
// LINE_W must equal the number of valid pixels per sensor line.
module bayer2rgb
  import img_cap_pkg::*;
#(
  parameter int unsigned LINE_W   = 1280,
  parameter int unsigned NUM_TAPS = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic [7:0] pix_data,
  input  coord_t     x,
  input  coord_t     y,
  input  window_t    win,
  output logic       rgb_valid,
  output rgb_t       rgb
);
  logic [NUM_TAPS-1:0][7:0] taps;
  logic [7:0] cur_q, cur_qq, up_qq;
  coord_t     x_q, y_q;
  logic       v_q;
  coord_t     wx, wy, ww, wh;
  logic [COORD_W:0] x_end, y_end;
  logic       in_win;

  line_buffer #(.WIDTH(8), .TAP_DIST(LINE_W), .NUM_TAPS(NUM_TAPS)) u_line (
    .clk, .rst_n, .en(pix_valid), .shift_in(pix_data), .taps
  );

  assign wx = {win.x[COORD_W-1:1], 1'b0};
  assign wy = {win.y[COORD_W-1:1], 1'b0};
  assign ww = {win.w[COORD_W-1:1], 1'b0};
  assign wh = {win.h[COORD_W-1:1], 1'b0};
  assign x_end = {1'b0, wx} + {1'b0, ww};
  assign y_end = {1'b0, wy} + {1'b0, wh};
  assign in_win = ({1'b0, x_q} >= {1'b0, wx}) && ({1'b0, x_q} < x_end) &&
                  ({1'b0, y_q} >= {1'b0, wy}) && ({1'b0, y_q} < y_end);

  // stage 1: align the current pixel with the buffer output (taps update
  // on the same enable), keep the previous column of both rows
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= '0; cur_qq <= '0; up_qq <= '0;
      x_q <= '0; y_q <= '0; v_q <= 1'b0;
    end else begin
      v_q <= pix_valid;
      if (pix_valid) begin
        cur_q  <= pix_data;
        cur_qq <= cur_q;
        up_qq  <= taps[0];
        x_q    <= x;
        y_q    <= y;
      end
    end
  end

  // stage 2: quad complete at odd row and odd column
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb_valid <= 1'b0;
      rgb       <= '0;
    end else begin
      rgb_valid <= v_q & x_q[0] & y_q[0] & in_win;
      if (v_q) begin
        rgb.r <= taps[0];                                  // (even row, odd col)
        rgb.b <= cur_qq;                                   // (odd row, even col)
        rgb.g <= 8'(({1'b0, cur_q} + {1'b0, up_qq}) >> 1); // mean of two greens
      end
    end
  end
endmodule
