// tb_dc_fifo: self-checking test of the dual-clock FIFO.
//
// Write clock 10 ns, read clock 7 ns.  Phase 1 fills the FIFO with reads
// stopped and checks that wfull rises after exactly 2**AW words; phase 2
// drains it and checks order and that rempty returns; phase 3 runs random
// writes and reads concurrently and checks every word in order.  Writes are
// only issued while wfull is low.
module tb_dc_fifo;
  localparam int DW = 24, AW = 4, DEPTH = 1 << AW;
  logic wclk = 0, rclk = 0, rst_n = 1;  // pulled low at 1 ns: asynchronous reset
  initial #1 rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic wfull, rempty;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  int nwritten = 0, nread = 0;
  bit allow_rd = 0, allow_wr = 0, rand_mode = 0;

  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  dc_fifo #(.DW(DW), .AW(AW)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wdata, .wfull,
    .rclk, .rrst_n(rst_n), .rd_en, .rdata, .rempty);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  always @(negedge wclk) begin
    wr_en = allow_wr && !wfull && (!rand_mode || $urandom % 2 == 0);
    if (wr_en) begin
      wdata = DW'($urandom);
      model.push_back(wdata);
      nwritten++;
    end
  end

  always @(negedge rclk) begin
    rd_en = allow_rd && !rempty && (!rand_mode || $urandom % 3 != 0);
    if (rd_en) begin
      check(model.size() > 0 && rdata == model[0], "read data in order");
      if (model.size() > 0) void'(model.pop_front());
      nread++;
    end
  end

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1;
    check(rempty && !wfull, "empty after reset");
    allow_wr = 1;
    wait (wfull);
    @(negedge wclk); allow_wr = 0;
    check(nwritten == DEPTH, $sformatf("full after %0d words", nwritten));
    repeat (10) @(posedge rclk);
    allow_rd = 1;
    wait (nread == DEPTH);
    repeat (6) @(posedge rclk);
    check(rempty, "empty after drain");
    repeat (6) @(posedge wclk);
    check(!wfull, "not full after drain");
    rand_mode = 1; allow_wr = 1;
    wait (nwritten >= DEPTH + 400);
    allow_wr = 0;
    wait (model.size() == 0);
    repeat (6) @(posedge rclk);
    check(rempty && nread == nwritten, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
