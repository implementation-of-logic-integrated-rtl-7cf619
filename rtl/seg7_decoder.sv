// Hexadecimal to seven-segment decoder.
//
// Turns a 4-bit key code into the segment pattern that shows it on one
// common-cathode digit (segment on = 1), the patterns the tester uses for
// the part number: 0-9 as decimal digits and A, b, C, d, E, F for the codes
// 10-15. Output bit 6 is segment a, bit 0 is segment g. Purely
// combinational, no latency.
//
// The digit shapes follow the tester: 7 has segments a b c, 9 has no
// segment d. Nothing here is a design choice beyond the bit order.
module seg7_decoder
  import ictester_pkg::*;
(
  input  nibble_t code,   // key code / digit value
  output seg7_t   seg     // {a,b,c,d,e,f,g}, active high
);

  always_comb begin
    unique case (code)
      4'h0: seg = 7'b1111110;
      4'h1: seg = 7'b0110000;
      4'h2: seg = 7'b1101101;
      4'h3: seg = 7'b1111001;
      4'h4: seg = 7'b0110011;
      4'h5: seg = 7'b1011011;
      4'h6: seg = 7'b1011111;
      4'h7: seg = 7'b1110000;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1110011;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b0011111;
      4'hC: seg = 7'b1001110;
      4'hD: seg = 7'b0111101;
      4'hE: seg = 7'b1001111;
      default: seg = 7'b1000111;   // 4'hF
    endcase
  end

endmodule
