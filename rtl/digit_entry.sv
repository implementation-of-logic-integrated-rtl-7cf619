// Part-number digit entry.
//
// Collects the four digits of the IC number. A position counter starts at 0
// (leftmost digit) and each digit key writes its code into the register of
// the current position and advances the counter; after the fourth digit the
// counter wraps so that the next key starts over at the leftmost position.
// Registers that are not overwritten keep their old value.
//
// Interface: digit_valid/digit_code come from the keypad interface;
// digits[0..3] hold the number, digits[0] leftmost ("7" of 7408). wr_en,
// wr_pos and wr_code repeat the write one cycle later, for the display.
// Timing: digits[] and wr_* are updated on the clock edge that sees
// digit_valid. Keys are ignored while hold is high (a test is running),
// which is this design's choice; the counting and wrap follow the tester.
module digit_entry
  import ictester_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hold,          // ignore keys (test in progress)
  input  logic       digit_valid,   // one-cycle pulse per digit key
  input  nibble_t    digit_code,
  output nibble_t    digits [4],    // entered number, [0] leftmost
  output logic       wr_en,         // a digit was just stored
  output logic [1:0] wr_pos,        // at this position
  output nibble_t    wr_code        // with this code
);

  logic [1:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos     <= '0;
      wr_en   <= 1'b0;
      wr_pos  <= '0;
      wr_code <= '0;
      for (int i = 0; i < 4; i++) digits[i] <= '0;
    end else begin
      wr_en <= 1'b0;
      if (digit_valid && !hold) begin
        digits[pos] <= digit_code;
        wr_en       <= 1'b1;
        wr_pos      <= pos;
        wr_code     <= digit_code;
        pos         <= pos + 2'd1;   // 3 wraps to 0
      end
    end
  end

endmodule
