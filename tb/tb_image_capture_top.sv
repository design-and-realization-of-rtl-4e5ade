// tb_image_capture_top: end-to-end test of the image acquisition core.
//
// A sensor model (32 x 20 active pixels, so the row buffer is reduced to 32)
// runs freely; a memory model with random waitrequest stands in for the
// SDRAM; the test plays the processor through the slave port, following
// the driver flow: wait for BUSY low, set the write address, set GO, poll
// FRAME_DONE and WRITE_DONE, read the current address.
//   1. single frame, window (4,2) 24 x 16, GO given in the middle of a frame
//      (the core must wait for the next frame start);
//   2. GO while busy is ignored;
//   3. consecutive mode over the full 32 x 20 frame, two frames back to back
//      in memory, then CONT cleared and the core goes idle.
// Every written word is compared with the reference (2x2 quad -> RGB ->
// clamped fixed-point YUV) and the count of words per frame is checked.
// Mechanisms counted: waitrequest stalls, U/V clamped to 0, windowed frame,
// consecutive frames, mid-frame GO, GO while busy, FRAME_DONE, WRITE_DONE,
// status clear.
module tb_image_capture_top;
  import img_cap_pkg::*;
  import tb_img_ref_pkg::*;
  localparam int W = 32, H = 20;

  logic clk = 0, pixclk = 0, rst_n = 1;  // pulled low at 1 ns: asynchronous reset
  initial #1 rst_n = 0;
  logic [2:0]  avs_address = 0;
  logic        avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [31:0] avm_address, avm_writedata;
  logic        avm_write, avm_waitrequest;
  logic [3:0]  avm_byteenable;
  logic        fv, lv;
  logic [9:0]  dout;
  int          frame_no;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_window = 0, n_cont = 0, n_midgo = 0, n_busygo = 0;
  int n_fdone = 0, n_wdone = 0, n_clear = 0;

  always #5  clk = ~clk;      // Avalon bus, 100 MHz
  always #19 pixclk = ~pixclk;

  mt9m011_model #(.W(W), .H(H), .P(4), .Q(12), .VB(30)) u_sensor (
    .pixclk, .frame_valid(fv), .line_valid(lv), .dout, .frame_no);

  avalon_mem_model #(.STALL(1)) u_mem (
    .clk, .address(avm_address), .write(avm_write), .writedata(avm_writedata),
    .byteenable(avm_byteenable), .waitrequest(avm_waitrequest));

  image_capture_top #(.LINE_W(W), .FIFO_AW(4)) dut (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest,
    .pixclk, .frame_valid(fv), .line_valid(lv), .sensor_data(dout));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = a; avs_writedata = d;
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_read = 1; avs_address = a;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_chipselect = 0; avs_read = 0;
  endtask

  task automatic wait_status(input logic [31:0] mask, input bit val);
    logic [31:0] s;
    do rd(3'd1, s); while (((s & mask) != 0) != val);
  endtask

  // compare one stored frame with the reference
  task automatic check_frame(input int f, input logic [31:0] base,
                             input int wx, input int wy, input int ww, input int wh);
    int bad = 0;
    for (int j = 0; j < wh / 2; j++)
      for (int i = 0; i < ww / 2; i++) begin
        logic [31:0] a, got, exp;
        a = base + 32'(4 * (j * (ww / 2) + i));
        exp = ref_word(f, wx + 2 * i, wy + 2 * j);
        got = u_mem.mem.exists(a) ? u_mem.mem[a] : 32'hDEAD_BEEF;
        checks++;
        if (got != exp) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL frame %0d pixel (%0d,%0d) got %h exp %h", f, i, j, got, exp);
        end
        if (got[15:8] == 0 && (-169 * int'(ref_rgb(f, wx + 2 * i, wy + 2 * j).r)
                               - 332 * int'(ref_rgb(f, wx + 2 * i, wy + 2 * j).g)
                               + 500 * int'(ref_rgb(f, wx + 2 * i, wy + 2 * j).b)) < 0)
          n_clamp++;
      end
  endtask

  initial begin
    logic [31:0] s, cur;
    int f0, nw0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. single windowed frame, GO in mid-frame ----
    wait_status(32'h4, 0);
    wr(3'd2, 32'h0000_1000);
    wr(3'd4, 4); wr(3'd5, 2); wr(3'd6, 24); wr(3'd7, 16);
    wait (frame_no == 1 && lv);
    f0 = frame_no;
    wr(3'd0, CMOS_GO_BIT);
    n_midgo++;
    wr(3'd0, CMOS_GO_BIT);                 // ignored: already busy
    rd(3'd1, s);
    check((s & 32'h4) != 0, "BUSY after GO");
    wait_status(CMOS_FRAME_DONE_BIT, 1);
    n_fdone++;
    check(frame_no == f0 + 1 || !fv, "frame done at end of the frame after GO");
    wait_status(CMOS_WRITE_DONE_BIT, 1);
    n_wdone++;
    rd(3'd1, s);
    check((s & 32'h4) == 0, "BUSY clears after the frame is in memory");
    check(u_mem.n_write == 12 * 8, $sformatf("window frame words %0d", u_mem.n_write));
    check_frame(f0 + 1, 32'h0000_1000, 4, 2, 24, 16);
    n_window++;
    rd(3'd3, cur);
    check(cur == 32'h0000_1000 + 12 * 8 * 4, "current address after frame");
    // ---- 2. GO while busy was ignored: still only one frame written ----
    repeat (3000) @(negedge clk);
    check(u_mem.n_write == 96, "GO while busy did not start another frame");
    n_busygo++;
    wr(3'd1, 0);
    rd(3'd1, s);
    check(s == 0, "status cleared by writing 0");
    n_clear++;
    // ---- 3. consecutive mode, full frame, two frames back to back ----
    wr(3'd4, 0); wr(3'd5, 0); wr(3'd6, W); wr(3'd7, H);
    wr(3'd2, cur);
    wait (lv);
    f0 = frame_no;
    nw0 = u_mem.n_write;
    wr(3'd0, CMOS_GO_BIT | CMOS_CONT_BIT);
    wait_status(CMOS_WRITE_DONE_BIT, 1);
    n_wdone++; n_cont++;
    wr(3'd1, 0);
    wait_status(CMOS_WRITE_DONE_BIT, 1);
    n_wdone++; n_cont++;
    wr(3'd0, 0);                           // leave consecutive mode
    wait_status(32'h4, 0);
    n_fdone++;
    repeat (4000) @(negedge clk);
    rd(3'd3, s);
    check(u_mem.n_write - nw0 == int'(s - cur) / 4, "words written match current address");
    check((u_mem.n_write - nw0) % ((W / 2) * (H / 2)) == 0 && u_mem.n_write - nw0 >= 2 * (W / 2) * (H / 2),
          $sformatf("whole frames in consecutive mode (%0d words)", u_mem.n_write - nw0));
    check_frame(f0 + 1, cur, 0, 0, W, H);
    check_frame(f0 + 2, cur + 32'(4 * (W / 2) * (H / 2)), 0, 0, W, H);
    // ---- mechanisms seen ----
    check(u_mem.n_stall > 0, $sformatf("waitrequest stalls: %0d", u_mem.n_stall));
    check(n_clamp > 0, $sformatf("U clamped to 0: %0d", n_clamp));
    check(n_window > 0 && n_cont >= 2 && n_midgo > 0 && n_busygo > 0, "capture modes exercised");
    check(n_fdone > 0 && n_wdone >= 3 && n_clear > 0, "status events exercised");
    $display("mechanisms: stalls=%0d clamp=%0d window=%0d cont=%0d midgo=%0d busygo=%0d fdone=%0d wdone=%0d clear=%0d",
             u_mem.n_stall, n_clamp, n_window, n_cont, n_midgo, n_busygo, n_fdone, n_wdone, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
