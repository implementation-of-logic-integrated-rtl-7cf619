// Keypad encoder interface.
//
// The keypad is scanned and debounced by an external 74C922 encoder, which
// presents a 4-bit key code X and raises its data-available line K while a
// key is held. This block brings K and X into the system clock domain with
// two flip-flop stages each and, on every rising edge of the synchronised K,
// emits a one-cycle pulse: key_start when the code is the start-testing key
// (code 4'hF), key_digit with the code on key_code for any other key.
//
// Timing: the pulse comes three clock edges after K rises (two synchroniser
// stages and the edge-detect register). The code is taken from the X
// synchroniser in the same cycle, so X must be stable for two clocks before
// K rises, as the encoder guarantees (its code is valid before DA).
//
// Following the tester: a key is acted on at the rising edge of K, and the
// code 4'hF is the start key while every other code counts as a digit. The
// system clock and the synchronisers are this design's own; the original
// logic was clocked by K itself.
module keypad_interface
  import ictester_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,      // asynchronous, active low
  input  logic    k,          // encoder data available (DA)
  input  nibble_t x,          // encoder key code
  output logic    key_digit,  // one-cycle pulse: a digit key was pressed
  output logic    key_start,  // one-cycle pulse: the start key was pressed
  output nibble_t key_code    // code of the key, valid with key_digit
);

  logic [1:0] k_sync;
  nibble_t    x_sync1, x_sync2;
  logic       k_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_sync  <= '0;
      x_sync1 <= '0;
      x_sync2 <= '0;
      k_prev  <= 1'b0;
    end else begin
      k_sync  <= {k_sync[0], k};
      x_sync1 <= x;
      x_sync2 <= x_sync1;
      k_prev  <= k_sync[1];
    end
  end

  wire k_rise = k_sync[1] & ~k_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_digit <= 1'b0;
      key_start <= 1'b0;
      key_code  <= '0;
    end else begin
      key_digit <= k_rise && (x_sync2 != KEY_START);
      key_start <= k_rise && (x_sync2 == KEY_START);
      if (k_rise) key_code <= x_sync2;
    end
  end

  // Never both at once (both are cleared by reset, so this holds throughout).
  assert property (@(posedge clk) !(key_digit && key_start));

endmodule
