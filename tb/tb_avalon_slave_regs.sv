// tb_avalon_slave_regs: self-checking test of the register file.
//
// Checks reset values (window 640x480, frame length 320*240), write/read of
// WRITE_ADDRESS and the window registers, CURRENT_ADDRESS readback, that GO
// gives one pulse and sets BUSY, that GO is ignored while BUSY, that
// FRAME_DONE and WRITE_DONE are set by their events, survive reads and
// non-zero writes and are cleared by writing 0, that BUSY ends at
// write_done in single mode but not in consecutive mode, and frame_len.
module tb_avalon_slave_regs;
  import img_cap_pkg::*;

  logic clk = 0, rst_n = 1;  // pulled low at 1 ns so the asynchronous reset fires at once
  initial #1 rst_n = 0;
  logic [REG_ADDR_W-1:0] avs_address = '0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic frame_done = 0, write_done = 0;
  logic [31:0] cur_addr = 32'hCAFE_0000;
  logic go, cont;
  logic [31:0] head_addr;
  window_t win;
  logic [FLEN_W-1:0] frame_len;
  int checks = 0, failures = 0, ngo = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (go) ngo++;

  avalon_slave_regs dut (
    .clk, .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .frame_done, .write_done, .cur_addr,
    .go, .cont, .head_addr, .win, .frame_len);

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

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(3'd6, d); check(d == 640, "WIN_W reset 640");
    rd(3'd7, d); check(d == 480, "WIN_H reset 480");
    check(frame_len == 320 * 240, "frame_len QVGA");
    rd(3'd1, d); check(d == 0, "status 0 after reset");
    wr(3'd2, 32'h0123_4560); rd(3'd2, d);
    check(d == 32'h0123_4560 && head_addr == 32'h0123_4560, "write_address");
    rd(3'd3, d); check(d == 32'hCAFE_0000, "current address");
    wr(3'd4, 2); wr(3'd5, 4); wr(3'd6, 100); wr(3'd7, 60);
    check(win.x == 2 && win.y == 4 && win.w == 100 && win.h == 60, "window registers");
    check(frame_len == 50 * 30, "frame_len from window");
    // single capture
    wr(3'd0, 32'h1);
    check(ngo == 1, "GO pulses once");
    rd(3'd1, d); check(d == 32'h4, "BUSY after GO");
    rd(3'd0, d); check(d == 0, "GO reads back 0");
    wr(3'd0, 32'h1);
    check(ngo == 1, "GO ignored while busy");
    pulse(frame_done);
    rd(3'd1, d); check(d == 32'h5, "FRAME_DONE set");
    rd(3'd1, d); check(d == 32'h5, "read does not change status");
    pulse(write_done);
    rd(3'd1, d); check(d == 32'h3, "WRITE_DONE set, BUSY cleared");
    wr(3'd1, 32'h7);
    rd(3'd1, d); check(d == 32'h3, "non-zero write keeps status");
    wr(3'd1, 32'h0);
    rd(3'd1, d); check(d == 32'h0, "write 0 clears status");
    // consecutive capture
    wr(3'd0, 32'h3);
    check(ngo == 2 && cont, "GO with CONT");
    rd(3'd0, d); check(d == 32'h2, "CONT reads back");
    pulse(write_done);
    rd(3'd1, d); check(d == 32'h6, "BUSY stays in consecutive mode");
    wr(3'd0, 32'h0);
    pulse(write_done);
    rd(3'd1, d); check(d == 32'h2, "BUSY ends after CONT cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
