// tb_rgb2yuv: self-checking test of the RGB-to-YUV converter.
//
// Drives corner colours (black, white, pure R/G/B and their complements) and
// random colours, back to back and with gaps, and compares each output with
// the fixed-point formulas evaluated in the testbench (coefficients times
// 128, floor division, clamp to 0..255).  It also checks that the result is
// within 2 of the real-valued formula (before clamping), that the clamp at 0
// is exercised, and that the latency is two clocks.
module tb_rgb2yuv;
  import img_cap_pkg::*;
  import tb_img_ref_pkg::*;

  logic clk = 0, rst_n = 1;  // pulled low at 1 ns so the asynchronous reset fires at once
  initial #1 rst_n = 0;
  logic rgb_valid = 0;
  rgb_t rgb = '0;
  logic yuv_valid;
  yuv_t yuv;
  int checks = 0, failures = 0, nclamp = 0;

  always #5 clk = ~clk;

  rgb2yuv dut (.clk, .rst_n, .rgb_valid, .rgb, .yuv_valid, .yuv);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  typedef struct { rgb_s c; longint t; } item_t;
  item_t q[$];
  longint cyc = 0;

  function automatic bit near(int got, real exact);
    real e;
    e = exact < 0.0 ? 0.0 : (exact > 255.0 ? 255.0 : exact);
    return (real'(got) - e) <= 2.0 && (e - real'(got)) <= 2.0;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && yuv_valid) begin
      item_t it;
      yuv_s e;
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        it = q.pop_front();
        e = ref_yuv_of(it.c);
        check(int'(yuv.y) == e.y && int'(yuv.u) == e.u && int'(yuv.v) == e.v,
              $sformatf("rgb %0d/%0d/%0d -> %0d/%0d/%0d exp %0d/%0d/%0d", it.c.r, it.c.g, it.c.b,
                        yuv.y, yuv.u, yuv.v, e.y, e.u, e.v));
        check(near(int'(yuv.y),  0.299 * it.c.r + 0.587 * it.c.g + 0.114  * it.c.b) &&
              near(int'(yuv.u), -0.169 * it.c.r - 0.332 * it.c.g + 0.500  * it.c.b) &&
              near(int'(yuv.v),  0.500 * it.c.r - 0.419 * it.c.g - 0.0813 * it.c.b), "close to real formula");
        check(cyc - it.t == 2, "latency two clocks");
        if (-169 * it.c.r - 332 * it.c.g + 500 * it.c.b < 0) nclamp++;
      end
    end
  end

  task automatic send(input int r, input int g, input int b);
    rgb_s c;
    @(negedge clk);
    rgb_valid = 1;
    rgb = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    c.r = r; c.g = g; c.b = b;
    q.push_back('{c, cyc + 1});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(0, 0, 0); send(255, 255, 255); send(255, 0, 0); send(0, 255, 0);
    send(0, 0, 255); send(0, 255, 255); send(255, 0, 255); send(255, 255, 0);
    for (int i = 0; i < 500; i++) begin
      if ($urandom % 4 == 0) begin @(negedge clk); rgb_valid = 0; end
      send($urandom % 256, $urandom % 256, $urandom % 256);
    end
    @(negedge clk); rgb_valid = 0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all inputs converted");
    check(nclamp > 0, "U clamp at 0 exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
