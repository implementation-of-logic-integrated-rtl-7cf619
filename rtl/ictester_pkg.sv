// Shared types and constants of the TTL logic IC tester.
//
// The tester enters a four-digit 74-series part number from a keypad, shows
// it on four seven-segment digits, and on the start key exercises the four
// 2-input gates of the chip in the test socket with every input combination,
// then shows PASS or FAIL.
//
// Segment patterns are 7 bits, active high, bit 6 = segment a down to
// bit 0 = segment g (the usual a..g lettering, a at the top, going clockwise,
// g in the middle). The letter patterns for F, A, I, L, P and S are the ones
// the tester prints; the mapping of part numbers to gate types follows the
// 74-series numbering (7400 NAND, 7408 AND, 7432 OR, 7486 XOR).
package ictester_pkg;

  typedef logic [3:0] nibble_t;   // one key code / one decimal digit
  typedef logic [6:0] seg7_t;     // {a,b,c,d,e,f,g}

  // Key code the keypad encoder delivers for the start-testing key (*).
  localparam nibble_t KEY_START = 4'hF;

  // Number of gates in a quad 2-input package and of input combinations.
  localparam int unsigned NGATES   = 4;
  localparam int unsigned NVECTORS = 4;

  // Letters shown for the test result.
  localparam seg7_t SEG_BLANK = 7'b0000000;
  localparam seg7_t SEG_F     = 7'b1000111;  // a e f g
  localparam seg7_t SEG_A     = 7'b1110111;  // a b c e f g
  localparam seg7_t SEG_I     = 7'b0110000;  // b c
  localparam seg7_t SEG_L     = 7'b0001110;  // d e f
  localparam seg7_t SEG_P     = 7'b1100111;  // a b e f g
  localparam seg7_t SEG_S     = 7'b1011011;  // a c d f g

  // Gate types the tester knows.
  typedef enum logic [2:0] {
    IC_NONE = 3'd0,   // number not recognised: no test
    IC_7400 = 3'd1,   // quad 2-input NAND
    IC_7408 = 3'd2,   // quad 2-input AND
    IC_7432 = 3'd3,   // quad 2-input OR
    IC_7486 = 3'd4    // quad 2-input XOR
  } ic_type_e;

  // Expected output of one gate of the given type.
  function automatic logic gate_expect(ic_type_e t, logic a, logic b);
    unique case (t)
      IC_7400: return ~(a & b);
      IC_7408: return a & b;
      IC_7432: return a | b;
      IC_7486: return a ^ b;
      default: return 1'b0;
    endcase
  endfunction

  // Input pattern number v (0..3) applied to every gate: bit 0 drives the
  // A inputs, bit 1 the B inputs, so the order is (A,B) = 00, 10, 01, 11.
  typedef logic [1:0] vec_t;

endpackage
