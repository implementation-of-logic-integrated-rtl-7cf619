// IC type recognition.
//
// Maps the entered part number to the gate type to test. As in the tester,
// only the last two digits are compared, so "7408" and any other number
// ending in 08 both select the AND test:
//   ..00 -> quad NAND (7400)   ..08 -> quad AND (7408)
//   ..32 -> quad OR   (7432)   ..86 -> quad XOR (7486)
// Any other ending gives IC_NONE and no test is run. Combinational.
module ic_select
  import ictester_pkg::*;
(
  input  nibble_t  digits [4],   // [0] leftmost
  output ic_type_e ic_type
);

  always_comb begin
    unique case ({digits[2], digits[3]})
      8'h00:   ic_type = IC_7400;
      8'h08:   ic_type = IC_7408;
      8'h32:   ic_type = IC_7432;
      8'h86:   ic_type = IC_7486;
      default: ic_type = IC_NONE;
    endcase
  end

endmodule
