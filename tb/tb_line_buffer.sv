// tb_line_buffer: self-checking test of the RAM-based tapped shift register.
//
// Shifts random words in with random gaps in the enable and checks, after
// every enable, that tap 0 shows the word from TAP_DIST enables ago and tap 1
// the word from 2*TAP_DIST ago, and that the taps hold while en is low.
// Tap distance is reduced to 9 to keep the run short.
module tb_line_buffer;
  localparam int D = 9;
  logic clk = 0, rst_n = 1, en = 0;  // rst_n pulled low at 1 ns: asynchronous reset
  initial #1 rst_n = 0;
  logic [7:0] din;
  logic [1:0][7:0] taps;
  int checks = 0, failures = 0;
  byte unsigned hist[$];

  always #5 clk = ~clk;

  line_buffer #(.WIDTH(8), .TAP_DIST(D), .NUM_TAPS(2)) dut (
    .clk, .rst_n, .en, .shift_in(din), .taps);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    logic [1:0][7:0] held;
    din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 8'($urandom);
      if (en) hist.push_back(din);
      held = taps;
      @(posedge clk);
      #1;
      if (en && hist.size() > 2 * D) begin
        check(taps[0] == hist[hist.size() - 1 - D], "tap 0 is one distance back");
        check(taps[1] == hist[hist.size() - 1 - 2 * D], "tap 1 is two distances back");
      end else if (!en) begin
        check(taps == held, "taps hold while disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
