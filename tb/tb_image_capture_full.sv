// tb_image_capture_full: one complete capture with the core at its default
// size: 1280-pixel sensor lines (row buffer 1280 deep), a 1280 x 1024
// sensor frame and the reset window of 640 x 480 sensor pixels, which gives
// a 320 x 240 (QVGA) YUV image of 76800 words.
//
// The processor sets the write address and GO (single frame, reset window);
// when WRITE_DONE is set, every one of the 76800 words in memory is compared
// with the reference, and the current address must point just past the
// image.  The memory model stalls with random waitrequest.
module tb_image_capture_full;
  import img_cap_pkg::*;
  import tb_img_ref_pkg::*;
  localparam int W = 1280, H = 1024, OW = 320, OH = 240;

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

  always #5  clk = ~clk;
  always #19 pixclk = ~pixclk;

  mt9m011_model #(.W(W), .H(H), .P(8), .Q(40), .VB(100)) u_sensor (
    .pixclk, .frame_valid(fv), .line_valid(lv), .dout, .frame_no);

  avalon_mem_model #(.STALL(1)) u_mem (
    .clk, .address(avm_address), .write(avm_write), .writedata(avm_writedata),
    .byteenable(avm_byteenable), .waitrequest(avm_waitrequest));

  image_capture_top dut (
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

  initial begin
    logic [31:0] s;
    int f0, bad;
    bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(3'd2, 32'h0040_0000);
    wait (lv);
    f0 = frame_no;
    wr(3'd0, CMOS_GO_BIT);
    do begin
      repeat (1000) @(negedge clk);
      rd(3'd1, s);
    end while ((s & CMOS_WRITE_DONE_BIT) == 0);
    // the window ends at row 480, so the image is in memory before the
    // sensor frame (1024 rows) ends and FRAME_DONE follows later
    check((s & CMOS_FRAME_DONE_BIT) == 0, "WRITE_DONE before end of sensor frame");
    do rd(3'd1, s); while ((s & CMOS_FRAME_DONE_BIT) == 0);
    check(!fv, "FRAME_DONE at end of sensor frame");
    check((s & CMOS_BUSY_BIT) == 0, "BUSY cleared");
    check(u_mem.n_write == OW * OH, $sformatf("%0d words written", u_mem.n_write));
    for (int j = 0; j < OH; j++)
      for (int i = 0; i < OW; i++) begin
        logic [31:0] a, got;
        a = 32'h0040_0000 + 32'(4 * (j * OW + i));
        got = u_mem.mem.exists(a) ? u_mem.mem[a] : 32'hDEAD_BEEF;
        checks++;
        if (got != ref_word(f0 + 1, 2 * i, 2 * j)) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL pixel (%0d,%0d) got %h", i, j, got);
        end
      end
    rd(3'd3, s);
    check(s == 32'h0040_0000 + OW * OH * 4, "current address past the image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
