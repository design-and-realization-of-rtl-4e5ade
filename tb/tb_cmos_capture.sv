// tb_cmos_capture: self-checking test of the sensor timing judge.
//
// A sensor model streams 12x6 frames.  The test checks that nothing is
// captured before start, that a start issued in the middle of a frame waits
// for the next frame, that every captured pixel carries the right data and
// row/column count in raster order, that frame_done pulses once per captured
// frame after FRAME_VALID falls, and that cont captures consecutive frames
// until it is cleared.  Latency from DOUT to pix_data is checked to be two
// pixel clocks.
module tb_cmos_capture;
  import tb_img_ref_pkg::*;
  localparam int W = 12, H = 6;

  logic clk = 0, rst_n = 1;  // pulled low at 1 ns so the asynchronous reset fires at once
  initial #1 rst_n = 0;
  logic fv, lv;
  logic [9:0] dout;
  int frame_no;
  logic start = 0, cont = 0;
  logic pix_valid, frame_done;
  logic [9:0] pix_data;
  logic [10:0] x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mt9m011_model #(.W(W), .H(H), .P(3), .Q(4), .VB(7)) u_sensor (
    .pixclk(clk), .frame_valid(fv), .line_valid(lv), .dout, .frame_no);

  cmos_capture #(.DATA_W(10)) dut (
    .clk, .rst_n, .frame_valid(fv), .line_valid(lv), .data(dout),
    .start, .cont, .pix_valid, .pix_data, .x, .y, .frame_done);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // scoreboard: raster order within a captured frame
  int ex = 0, ey = 0, npix = 0, ndone = 0, cap_frame = -1;
  logic [9:0] d_q1, d_q2;
  logic v_q1, v_q2;
  always @(posedge clk) begin
    d_q2 <= d_q1; d_q1 <= dout; v_q2 <= v_q1; v_q1 <= fv & lv;
    if (rst_n && pix_valid) begin
      if (ex == 0 && ey == 0) cap_frame = frame_no;
      check(x == 11'(ex) && y == 11'(ey), $sformatf("coord %0d,%0d exp %0d,%0d", x, y, ex, ey));
      check(pix_data == 10'(sensor_pix(cap_frame, ex, ey)), "pixel data");
      check(v_q2 && pix_data == d_q2, "two-clock latency");
      npix++;
      ex++;
      if (ex == W) begin ex = 0; ey++; end
    end
    if (rst_n && frame_done) begin
      check(ex == 0 && ey == H, "frame_done after last pixel of frame");
      check(!fv, "frame_done while FRAME_VALID low");
      ex = 0; ey = 0; ndone++;
    end
  end

  task automatic pulse_start;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frames 0 and 1 pass without start
    wait (frame_no == 1);
    check(npix == 0 && ndone == 0, "idle: nothing captured");
    // start in the middle of frame 1 -> frame 2 is captured
    repeat (30) @(posedge clk);
    pulse_start();
    wait (frame_no == 2);
    check(npix == 0, "mid-frame start waits for next frame");
    wait (frame_no == 3);
    check(npix == W * H && ndone == 1, $sformatf("single frame captured (%0d px, %0d done)", npix, ndone));
    check(cap_frame == 2, "captured frame is the one after start");
    wait (frame_no == 4);
    check(npix == W * H && ndone == 1, "single mode stops after one frame");
    // consecutive mode: start with cont, frames 5, 6, 7 captured
    repeat (30) @(posedge clk);
    cont = 1;
    pulse_start();
    wait (frame_no == 7);
    repeat (10) @(posedge clk);
    cont = 0;
    wait (frame_no == 9);
    check(ndone == 4, $sformatf("consecutive frames: %0d done (exp 4)", ndone));
    check(npix == 4 * W * H, "consecutive frames pixel count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
