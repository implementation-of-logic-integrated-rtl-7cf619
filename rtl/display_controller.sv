// Four-digit seven-segment display controller.
//
// Holds one segment register per digit, s[0] leftmost. A stored key writes
// the decoded pattern of its code into the digit at its position, so the
// part number builds up from the left as it is typed. A test result
// overwrites all four digits with the word PASS or FAIL; the next key then
// writes its digit over the word from the left again. After reset all
// digits are dark.
//
// Interface: wr_en/wr_pos/wr_code from the digit entry, result_valid/pass
// from the test sequencer (result wins if both arrive in one cycle). Each
// output is a registered pattern {a..g}, active high, meant for the segment
// driver transistors. Timing: outputs change on the clock edge that sees the
// write.
//
// What is shown and where follows the tester; the dark display after reset
// is this design's choice.
module display_controller
  import ictester_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [1:0] wr_pos,
  input  nibble_t    wr_code,
  input  logic       result_valid,
  input  logic       pass,
  output seg7_t      s [4]
);

  seg7_t digit_seg;

  seg7_decoder u_dec (
    .code (wr_code),
    .seg  (digit_seg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) s[i] <= SEG_BLANK;
    end else if (result_valid) begin
      if (pass) begin
        s[0] <= SEG_P; s[1] <= SEG_A; s[2] <= SEG_S; s[3] <= SEG_S;
      end else begin
        s[0] <= SEG_F; s[1] <= SEG_A; s[2] <= SEG_I; s[3] <= SEG_L;
      end
    end else if (wr_en) begin
      s[wr_pos] <= digit_seg;
    end
  end

endmodule
