// mt9m011_model: behavioural model of the CMOS image sensor's output timing
// (not synthesizable; testbench only).
//
// Frames repeat forever: FRAME_VALID low for VB clocks, then high; P clocks
// before the first line, H lines of W pixel clocks with LINE_VALID high, Q
// clocks of horizontal blanking between lines and P clocks after the last
// line before FRAME_VALID falls.  DOUT carries tb_img_ref_pkg::sensor_pix
// while LINE_VALID is high and 0 otherwise.  Outputs change on the falling
// edge of pixclk.  frame_no counts frames from 0 and changes when
// FRAME_VALID rises.
module mt9m011_model
  import tb_img_ref_pkg::*;
#(
  parameter int W = 16, H = 8, P = 3, Q = 5, VB = 10
) (
  input  logic       pixclk,
  output logic       frame_valid,
  output logic       line_valid,
  output logic [9:0] dout,
  output int         frame_no
);
  initial begin
    frame_valid = 1'b0;
    line_valid  = 1'b0;
    dout        = '0;
    frame_no    = -1;
    forever begin
      repeat (VB) @(negedge pixclk);
      frame_no++;
      frame_valid = 1'b1;
      repeat (P) @(negedge pixclk);
      for (int yy = 0; yy < H; yy++) begin
        for (int xx = 0; xx < W; xx++) begin
          line_valid = 1'b1;
          dout = 10'(sensor_pix(frame_no, xx, yy));
          @(negedge pixclk);
        end
        line_valid = 1'b0;
        dout = '0;
        repeat ((yy == H - 1) ? P : Q) @(negedge pixclk);
      end
      frame_valid = 1'b0;
    end
  end
endmodule
