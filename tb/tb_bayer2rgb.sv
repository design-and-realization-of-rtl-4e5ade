// tb_bayer2rgb: self-checking test of the Bayer-to-RGB stage.
//
// Feeds raster frames of a 16-pixel-wide sensor (line buffer distance
// reduced to 16) with random gaps between valid pixels.  For a window inside
// the frame and then for the full frame it checks that one RGB pixel comes
// out per 2x2 quad of the window, in raster order, with R, B taken from the
// quad and G the mean of its two greens, and that each output follows the
// quad's last (odd row, odd column) pixel by two clocks.
module tb_bayer2rgb;
  import img_cap_pkg::*;
  import tb_img_ref_pkg::*;
  localparam int W = 16, H = 10;

  logic clk = 0, rst_n = 1;  // pulled low at 1 ns so the asynchronous reset fires at once
  initial #1 rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix_data = 0;
  coord_t x = 0, y = 0;
  window_t win;
  logic rgb_valid;
  rgb_t rgb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bayer2rgb #(.LINE_W(W), .NUM_TAPS(2)) dut (
    .clk, .rst_n, .pix_valid, .pix_data, .x, .y, .win, .rgb_valid, .rgb);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // expected output queue
  typedef struct { int f, x, y; longint t; } quad_t;
  quad_t expq[$];
  int nout = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && rgb_valid) begin
      quad_t q;
      rgb_s c;
      if (expq.size() == 0) begin
        check(0, "unexpected RGB output");
      end else begin
        q = expq.pop_front();
        c = ref_rgb(q.f, q.x, q.y);
        check(int'(rgb.r) == c.r && int'(rgb.g) == c.g && int'(rgb.b) == c.b,
              $sformatf("quad (%0d,%0d) got %0d/%0d/%0d exp %0d/%0d/%0d",
                        q.x, q.y, rgb.r, rgb.g, rgb.b, c.r, c.g, c.b));
        check(cyc - q.t == 2, "latency two clocks");
      end
      nout++;
    end
  end

  task automatic run_frame(input int f, input int wx, input int wy, input int ww, input int wh);
    win = '{x: coord_t'(wx), y: coord_t'(wy), w: coord_t'(ww), h: coord_t'(wh)};
    wx = wx & ~1; wy = wy & ~1; ww = ww & ~1; wh = wh & ~1;  // core uses even values
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        while (($urandom % 3) == 0) begin
          @(negedge clk); pix_valid = 0;
        end
        @(negedge clk);
        pix_valid = 1;
        pix_data  = 8'(sensor_pix(f, xx, yy) >> 2);
        x = coord_t'(xx);
        y = coord_t'(yy);
        if ((xx % 2) == 1 && (yy % 2) == 1 && xx - 1 >= wx && xx - 1 < wx + ww && yy - 1 >= wy && yy - 1 < wy + wh)
          expq.push_back('{f, xx - 1, yy - 1, cyc + 1});
      end
    @(negedge clk); pix_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    win = '{x: 0, y: 0, w: 16, h: 10};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame(0, 4, 2, 8, 6);
    check(nout == 4 * 3 && expq.size() == 0, $sformatf("windowed frame: %0d outputs", nout));
    run_frame(1, 0, 0, W, H);
    check(nout == 12 + (W / 2) * (H / 2) && expq.size() == 0, "full frame output count");
    run_frame(2, 3, 1, 7, 5);  // odd values round down to even
    check(nout == 12 + 40 + 3 * 2 && expq.size() == 0, "odd window rounded to even");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
