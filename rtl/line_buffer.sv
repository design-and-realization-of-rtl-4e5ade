// line_buffer: RAM-based shift register with equally spaced taps.
//
// Each enabled clock shifts one word in.  Tap k (k = 0 .. NUM_TAPS-1) gives
// the word shifted in (k+1)*TAP_DIST enables earlier, so with TAP_DIST equal
// to the line length tap 0 is the pixel one row above and tap 1 the pixel two
// rows above.  The document gives the configuration: RAM based, two taps,
// tap distance 1280, width 8.
//
// How it works: one RAM of TAP_DIST words, each word holding NUM_TAPS
// samples, and a circular pointer.  On an enabled clock the word at the
// pointer is read (its slot k-1 holds the sample that must move on to slot k)
// and rewritten with the new input in slot 0.  The read samples are
// registered as the tap outputs.
//
// Timing: taps are valid one clock after the enable that shifted in the
// current input, and hold their value while en is low.  Contents are not
// cleared by reset; taps read before TAP_DIST enables are undefined.
module line_buffer #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned TAP_DIST = 1280,
  parameter int unsigned NUM_TAPS = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [WIDTH-1:0]              shift_in,
  output logic [NUM_TAPS-1:0][WIDTH-1:0] taps
);
  localparam int unsigned PW = (TAP_DIST > 1) ? $clog2(TAP_DIST) : 1;

  logic [NUM_TAPS-1:0][WIDTH-1:0] mem [TAP_DIST];
  logic [PW-1:0]                  ptr;
  logic [NUM_TAPS-1:0][WIDTH-1:0] rd_word, wr_word;

  assign rd_word = mem[ptr];

  always_comb begin
    wr_word[0] = shift_in;
    for (int k = 1; k < NUM_TAPS; k++) wr_word[k] = rd_word[k-1];
  end

  always_ff @(posedge clk)
    if (en) mem[ptr] <= wr_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      taps <= '0;
    end else if (en) begin
      ptr  <= (ptr == PW'(TAP_DIST - 1)) ? '0 : ptr + 1'b1;
      taps <= rd_word;
    end
  end
endmodule
