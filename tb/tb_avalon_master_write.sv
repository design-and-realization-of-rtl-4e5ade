// tb_avalon_master_write: self-checking test of the Avalon-MM write master.
//
// Pixels are written into the master's FIFO on a 27 ns pixel clock; the
// bus answers with waitrequest held high, low, or random.  Checks: writes go
// to consecutive word addresses from the head address, carry {8'h00, Y, U, V} in order, byteenable is all ones;
// write_done pulses once per frame_len words, only after the FIFO is empty;
// a second frame continues at the next address (cur_addr); when the FIFO
// already holds words of the next frame, write_done waits until it is empty
// and the surplus counts toward the next frame; start reloads
// the address; with waitrequest low one word is written per clock.
module tb_avalon_master_write;
  import img_cap_pkg::*;

  logic clk = 0, rst_n = 1;  // pulled low at 1 ns so the asynchronous reset fires at once
  initial #1 rst_n = 0;
  logic start = 0;
  logic [31:0] head_addr = 32'h0010_0000;
  logic [FLEN_W-1:0] frame_len = 20'd40;
  logic [31:0] cur_addr;
  logic write_done;
  logic pix_clk = 0, pix_valid = 0;
  yuv_t pix_yuv = '0;
  logic [31:0] avm_address, avm_writedata;
  logic avm_write;
  logic [3:0] avm_byteenable;
  logic avm_waitrequest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always #13.5 pix_clk = ~pix_clk;

  avalon_master_write #(.AW(32)) dut (
    .clk, .rst_n, .start, .head_addr, .frame_len, .cur_addr, .write_done,
    .pix_clk, .pix_rst_n(rst_n), .pix_valid, .pix_yuv,
    .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  logic [23:0] fq[$];     // words waiting to enter the FIFO
  logic [23:0] sent[$];   // words expected on the bus, in order
  bit rand_wait = 0, hold_wait = 0, overlap = 0;
  logic [31:0] exp_addr;
  int nwr = 0, ndone = 0, nwait = 0;
  longint cyc = 0, first_wr = -1, last_wr = -1;

  // pixel-side driver: one word per pixel clock while any are queued
  always @(negedge pix_clk) begin
    pix_valid = (fq.size() != 0);
    if (pix_valid) pix_yuv = fq.pop_front();
  end

  always @(negedge clk)
    avm_waitrequest = hold_wait ? 1'b1 : (rand_wait ? ($urandom % 3 == 0) : 1'b0);

  always @(posedge clk) begin
    cyc++;
    if (rst_n && avm_write && !avm_waitrequest) begin
      check(avm_address == exp_addr, $sformatf("address %h exp %h", avm_address, exp_addr));
      check(sent.size() > 0 && avm_writedata == {8'h00, sent[0]}, "write data in order");
      check(avm_byteenable == 4'hF, "byteenable");
      if (sent.size() > 0) void'(sent.pop_front());
      exp_addr += 4;
      nwr++;
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
    end
    if (rst_n && avm_write && avm_waitrequest) nwait++;
    if (rst_n && write_done) begin
      ndone++;
      check(dut.fifo_empty && fq.size() == 0 && !pix_valid && !avm_write,
            "write_done only with FIFO empty and bus idle");
      if (!overlap)
        check(nwr == ndone * int'(frame_len), $sformatf("write_done after %0d words", nwr));
      else
        check(nwr >= ndone * int'(frame_len), $sformatf("write_done after %0d words (overlap)", nwr));
    end
  end

  task automatic push_words(input int n);
    for (int i = 0; i < n; i++) begin
      logic [23:0] w;
      w = 24'($urandom);
      fq.push_back(w);
      sent.push_back(w);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; exp_addr = head_addr; @(negedge clk); start = 0;
    // frame 1: the bus is held off while all 40 words enter the FIFO, then
    // released: one write per clock
    hold_wait = 1;
    push_words(40);
    wait (fq.size() == 0);
    repeat (20) @(negedge clk);
    hold_wait = 0;
    wait (ndone == 1);
    check(last_wr - first_wr == 39, $sformatf("one write per clock (%0d cycles for 40)", last_wr - first_wr + 1));
    check(cur_addr == head_addr + 40 * 4, "cur_addr is next frame head");
    // frame 2: continues, words trickle in, random waitrequest
    rand_wait = 1;
    for (int i = 0; i < 40; i++) begin
      push_words(1);
      repeat ($urandom % 4) @(negedge pix_clk);
    end
    wait (ndone == 2);
    check(cur_addr == head_addr + 80 * 4, "second frame continues at next address");
    // restart at a new head address
    repeat (3) @(negedge clk);
    head_addr = 32'h0020_0000;
    frame_len = 20'd25;
    @(negedge clk); start = 1; exp_addr = head_addr; @(negedge clk); start = 0;
    nwr = 0; ndone = 0;
    push_words(25);
    wait (ndone == 1);
    check(nwr == 25 && sent.size() == 0, "restart frame written");
    check(nwait > 0, "waitrequest stalls exercised");
    repeat (20) @(negedge clk);
    check(ndone == 1, "no spurious write_done");
    // FIFO already holds part of the next frame when the count is reached:
    // write_done must wait until the FIFO is empty, and the surplus counts
    // toward the next frame
    overlap = 1;
    head_addr = 32'h0030_0000;
    frame_len = 20'd10;
    @(negedge clk); start = 1; exp_addr = head_addr; @(negedge clk); start = 0;
    nwr = 0; ndone = 0;
    hold_wait = 1;
    push_words(15);
    wait (fq.size() == 0);
    repeat (20) @(negedge clk);
    hold_wait = 0;
    wait (ndone == 1);
    check(nwr == 15, $sformatf("write_done only after FIFO drained (%0d words)", nwr));
    push_words(5);
    wait (ndone == 2);
    check(nwr == 20, "surplus counted toward the next frame");
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
