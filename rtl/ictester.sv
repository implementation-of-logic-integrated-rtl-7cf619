// TTL logic IC tester: the logic of the FPGA.
//
// An operator types the number of a quad 2-input gate chip (7400, 7408,
// 7432 or 7486) on a keypad; the digits appear on four seven-segment
// displays. Pressing the start key (*) drives all input combinations onto
// the chip in the test socket, reads its four gate outputs and shows PASS
// or FAIL.
//
//   k, x      -> keypad_interface -> digit_entry -> ic_select
//                                        |              |
//                                        v              v
//   s0..s3    <- display_controller <- gate_test_sequencer <-> y0..y11
//
// Socket lines: gate g (0..3) has inputs y(3g), y(3g+1) and output
// y(3g+2), so y0,y1,y3,y4,y6,y7,y9,y10 are driven and y2,y5,y8,y11 are
// read, as in the tester. On the standard quad 2-input pinout the gates sit
// on pins (1,2->3), (4,5->6), (9,10->8) and (12,13->11), pin 7 ground and
// pin 14 supply; which socket pin each y line reaches is board wiring.
// s0..s3 are the four digits, s0 leftmost, each {a,b,c,d,e,f,g} active high.
//
// The clock and reset are this design's own; the original logic ran from
// the keypad strobe alone. A keypad entry acts three clocks after k rises;
// a test takes 4*SETTLE_CYCLES+1 clocks plus one to update the display.
module ictester
  import ictester_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // keypad encoder
  input  logic    k,
  input  nibble_t x,
  // display
  output seg7_t   s0,
  output seg7_t   s1,
  output seg7_t   s2,
  output seg7_t   s3,
  // test socket
  output logic    y0,
  output logic    y1,
  input  logic    y2,
  output logic    y3,
  output logic    y4,
  input  logic    y5,
  output logic    y6,
  output logic    y7,
  input  logic    y8,
  output logic    y9,
  output logic    y10,
  input  logic    y11
);

  logic              key_digit, key_start;
  nibble_t           key_code;
  nibble_t           digits [4];
  logic              wr_en;
  logic [1:0]        wr_pos;
  nibble_t           wr_code;
  ic_type_e          ic_type;
  logic [NGATES-1:0] gate_a, gate_b, gate_y;
  logic              busy, done, pass;
  seg7_t             s [4];

  keypad_interface u_kbd (
    .clk, .rst_n, .k, .x,
    .key_digit, .key_start, .key_code
  );

  digit_entry u_entry (
    .clk, .rst_n,
    .hold        (busy),
    .digit_valid (key_digit),
    .digit_code  (key_code),
    .digits,
    .wr_en, .wr_pos, .wr_code
  );

  ic_select u_sel (
    .digits,
    .ic_type
  );

  gate_test_sequencer #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_seq (
    .clk, .rst_n,
    .start   (key_start),
    .ic_type,
    .gate_a, .gate_b, .gate_y,
    .busy, .done, .pass
  );

  display_controller u_disp (
    .clk, .rst_n,
    .wr_en, .wr_pos, .wr_code,
    .result_valid (done),
    .pass,
    .s
  );

  assign {y9, y6, y3, y0}  = gate_a;
  assign {y10, y7, y4, y1} = gate_b;
  assign gate_y = {y11, y8, y5, y2};

  assign s0 = s[0];
  assign s1 = s[1];
  assign s2 = s[2];
  assign s3 = s[3];

endmodule
