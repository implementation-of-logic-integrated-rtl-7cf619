// Drives the encoder lines like a 74C922 (code first, then data-available
// held for a while) and checks one pulse per key, the digit/start split,
// the code, and the three-clock latency from the rise of K.
module tb_keypad_interface;
  import ictester_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, k = 0;
  nibble_t x = '0;
  logic key_digit, key_start;
  nibble_t key_code;
  int cyc = 0, n_digit = 0, n_start = 0, last_pulse_cyc = 0;

  keypad_interface dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (key_digit) begin n_digit++; last_pulse_cyc = cyc; end
    if (key_start) begin n_start++; last_pulse_cyc = cyc; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic press(nibble_t code, int hold);
    int d0 = n_digit, s0 = n_start, rise_cyc;
    @(negedge clk) x = code;
    repeat (3) @(negedge clk);
    k = 1;
    rise_cyc = cyc;           // edges so far; K seen from the next edge on
    repeat (hold) @(negedge clk);
    k = 0;
    repeat (4) @(negedge clk);
    if (code == KEY_START) begin
      check(n_start == s0 + 1 && n_digit == d0, $sformatf("start key %h counted", code));
    end else begin
      check(n_digit == d0 + 1 && n_start == s0, $sformatf("digit key %h counted", code));
      check(key_code == code, $sformatf("code %h, got %h", code, key_code));
    end
    check(last_pulse_cyc == rise_cyc + 3,
          $sformatf("latency %0d clocks, expected 3", last_pulse_cyc - rise_cyc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 16; c++) press(nibble_t'(c), 2 + (c % 5) * 7);
    for (int i = 0; i < 20; i++) press(nibble_t'($urandom_range(0, 15)), $urandom_range(1, 30));
    check(n_start >= 1 && n_digit >= 15, "digit and start keys seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
